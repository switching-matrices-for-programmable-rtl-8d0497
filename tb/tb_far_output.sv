// tb_far_output: self-checking testbench of far_output (FAR and output side).
//
// The testbench plays the NI permuters homing on one FAR: for each frame it
// splits a random outgoing frame into NI disjoint partial frames, drives each
// one onto its bus one bit per cycle at a random time and raises done with
// its last bit. It checks that data_present rises only when all NI have
// finished, that far_free falls for each finished permuter, that a Master
// Output Event before that gives slip and no frame, and that after a
// successful event the outgoing line carries the assembled frame, bit 1
// first, one bit per out_bit_en strobe, marked by out_frame.
module tb_far_output;
  localparam int unsigned F  = ptdm_pkg::FRAME_BITS;
  localparam int unsigned NI = ptdm_pkg::NUM_IN;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [F-1:0] bus [NI];
  logic [NI-1:0] done = '0;
  logic [NI-1:0] far_free;
  logic moe = 1'b0, out_bit_en = 1'b0;
  logic out_bit, out_frame, data_present, slip;

  int checks = 0, failures = 0, n_slip = 0, n_frames = 0;

  always #5 clk = ~clk;

  far_output dut (.*);

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && slip) n_slip++;

  // Deliver one frame from all NI permuters, sequentially in random order.
  task automatic deliver(output logic [F-1:0] frame, input bit early_moe);
    int owner [F];
    int order [NI];
    frame = '0;
    for (int l = 0; l < int'(F); l++) begin
      owner[l] = int'($urandom % NI);
      frame[l] = 1'($urandom);
    end
    for (int i = 0; i < int'(NI); i++) order[i] = i;
    for (int i = int'(NI) - 1; i > 0; i--) begin
      int r, t;
      r = int'($urandom % (i + 1));
      t = order[i]; order[i] = order[r]; order[r] = t;
    end
    for (int n = 0; n < int'(NI); n++) begin
      int i;
      i = order[n];
      check(data_present == 1'b0, "no data present before all finished");
      check(far_free[i], "far_free before finishing");
      if (early_moe && n == int'(NI) - 1) begin
        int slip_before;
        slip_before = n_slip;
        moe = 1'b1;
        @(negedge clk);
        moe = 1'b0;
        @(negedge clk);
        check(n_slip == slip_before + 1, "slip on early event");
        check(!out_frame, "no frame sent on slip");
      end
      for (int l = 0; l < int'(F); l++) begin
        bus[i] = '0;
        if (owner[l] == i) bus[i][l] = frame[l];
        done[i] = (l == int'(F) - 1);
        @(negedge clk);
      end
      bus[i] = '0;
      done[i] = 1'b0;
      check(!far_free[i], "far_free low after finishing");
    end
    check(data_present == 1'b1, "data present after all finished");
  endtask

  task automatic send_and_check(input logic [F-1:0] frame);
    moe = 1'b1;
    @(negedge clk);
    moe = 1'b0;
    check(out_frame, "out_frame after the event");
    check(!data_present && far_free == '1, "FAR cleared by the event");
    for (int l = 0; l < int'(F); l++) begin
      check(out_bit == frame[l], $sformatf("outgoing bit %0d", l + 1));
      out_bit_en = 1'b1;
      @(negedge clk);
      out_bit_en = 1'b0;
      @(negedge clk);
    end
    check(out_bit == 1'b0, "line idle after the frame");
    n_frames++;
  endtask

  initial begin
    logic [F-1:0] fr;
    for (int i = 0; i < int'(NI); i++) bus[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    deliver(fr, 1'b0);
    send_and_check(fr);
    deliver(fr, 1'b1);
    send_and_check(fr);
    deliver(fr, 1'b0);
    send_and_check(fr);
    check(n_slip == 1 && n_frames == 3, "event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
