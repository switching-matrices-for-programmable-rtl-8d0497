// tb_route_column: self-checking testbench of route_column (R primitive).
//
// The testbench writes random XPTR(i,k) patterns, sends random frames on the
// line (one bit every third cycle) and rebuilds each PFR from the crosspoint
// outputs while pfr_shift is high. At every data_present it checks, for all
// k, that the rebuilt PFR equals frame AND XPTR(i,k) bit for bit (same bit
// positions), and that the pass took exactly F cycles. Also checked:
//   * routes persist from frame to frame without rewriting the XPTRs;
//   * a rewritten XPTR applies to the next frame;
//   * a pass does not start while perm_busy is high (stall) and starts when
//     it falls;
//   * xptr_ready is low during a pass, and a write held there is taken after;
//   * a second framing pulse while a frame waits gives one overrun pulse and
//     loses only the waiting frame.
module tb_route_column;
  localparam int unsigned F  = ptdm_pkg::FRAME_BITS;
  localparam int unsigned NO = ptdm_pkg::NUM_OUT;
  localparam int unsigned S  = 3;   // clock cycles per line bit

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic line_bit = 1'b0, line_bit_en = 1'b0, frame_pulse = 1'b0;
  logic [NO-1:0] perm_busy = '0;
  logic [NO-1:0] pfr_bit;
  logic pfr_shift, data_present, xptr_ready, routing, overrun;
  logic xptr_we = 1'b0;
  logic [$clog2(NO)-1:0] xptr_k = '0;
  logic [F-1:0] xptr_data = '0;

  int checks = 0, failures = 0;
  int n_dp = 0, n_overrun = 0, n_stall = 0, n_refused = 0;

  logic [F-1:0] xmodel [NO];     // XPTR contents as written
  logic [F-1:0] cap [NO];        // PFRs rebuilt from the crosspoint outputs
  logic [F-1:0] xsnap [NO];      // XPTR contents when the pass started
  logic [F-1:0] exp_q [$];       // completed frames still to be routed
  int shift_cnt = 0;

  always #5 clk = ~clk;

  route_column dut (.*);

  initial begin : watchdog
    repeat (40000) @(posedge clk);
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

  // Monitor: rebuild the PFRs and check each completed pass.
  always @(posedge clk) begin
    if (rst_n) begin
      if (pfr_shift) begin
        if (shift_cnt == 0) xsnap <= xmodel;
        for (int k = 0; k < int'(NO); k++) cap[k] <= {pfr_bit[k], cap[k][F-1:1]};
        shift_cnt <= shift_cnt + 1;
        if (perm_busy != '0) check(1'b0, "pass running while a PFR is busy");
        check(!xptr_ready, "xptr_ready low during a pass");
      end
      if (overrun) n_overrun++;
      if (data_present) begin
        logic [F-1:0] fr;
        n_dp++;
        check(shift_cnt == int'(F), $sformatf("pass length %0d", shift_cnt));
        shift_cnt <= 0;
        if (exp_q.size() == 0) check(1'b0, "data_present with no frame");
        else begin
          fr = exp_q.pop_front();
          for (int k = 0; k < int'(NO); k++)
            check(cap[k] == (fr & xsnap[k]), $sformatf("PFR(%0d) contents", k));
        end
      end
    end
  end

  logic [F-1:0] cur;
  task automatic send_frame(input bit push_prev);
    for (int b = 0; b < int'(F); b++) begin
      @(negedge clk);
      line_bit_en = 1'b1;
      line_bit    = 1'($urandom);
      frame_pulse = (b == 0);
      if (b == 0 && push_prev) exp_q.push_back(cur);
      cur[b] = line_bit;
      @(negedge clk);
      line_bit_en = 1'b0;
      frame_pulse = 1'b0;
      repeat (S - 2) @(negedge clk);
    end
  endtask

  task automatic write_xptr(input int k, input logic [F-1:0] v);
    @(negedge clk);
    xptr_we = 1'b1; xptr_k = k[$clog2(NO)-1:0]; xptr_data = v;
    @(posedge clk);
    while (!xptr_ready) begin n_refused++; @(posedge clk); end
    xmodel[k] = v;
    @(negedge clk);
    xptr_we = 1'b0;
  endtask

  function automatic logic [F-1:0] rand_mask();
    logic [F-1:0] m;
    for (int b = 0; b < int'(F); b++) m[b] = ($urandom % 3) == 0;
    return m;
  endfunction

  initial begin
    for (int k = 0; k < int'(NO); k++) begin xmodel[k] = '0; cap[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NO); k++) write_xptr(k, rand_mask());
    // Frames 0..2 with the same routes.
    send_frame(1'b0);
    send_frame(1'b1);
    send_frame(1'b1);
    // New routes for two outputs, written while frame 2's pass may run.
    fork
      send_frame(1'b1);
      begin
        wait (routing);
        write_xptr(3, rand_mask());   // held until the pass ends
        write_xptr(7, rand_mask());
      end
    join
    check(n_refused > 0, "a write was held off during a pass");
    // Stall: a PFR is busy when the next frame completes.
    perm_busy = 10'b0000100000;
    fork
      send_frame(1'b1);
      begin
        repeat (2) @(negedge clk);
        repeat (50) begin
          @(negedge clk);
          if (!routing) n_stall++;
        end
        check(n_stall == 50, "no pass while perm_busy");
        perm_busy = '0;
      end
    join
    // Overrun: frame 5 completes and waits behind a busy PFR; the framing
    // pulse that completes frame 6 then loses frame 5.
    send_frame(1'b1);                // completes frame 4, routed at once
    perm_busy = 10'b1;
    send_frame(1'b1);                // completes frame 5, which waits
    begin
      int ov_before;
      ov_before = n_overrun;
      @(negedge clk);
      frame_pulse = 1'b1;
      void'(exp_q.pop_back());       // frame 5 is lost
      exp_q.push_back(cur);          // frame 6 is complete
      @(negedge clk);
      frame_pulse = 1'b0;
      @(negedge clk);
      check(n_overrun == ov_before + 1, "one overrun pulse");
    end
    perm_busy = '0;
    repeat (3 * F) @(negedge clk);
    check(exp_q.size() == 0, "all frames routed");
    check(n_dp == 6, $sformatf("six passes completed, saw %0d", n_dp));
    $display("passes=%0d overruns=%0d refused_cycles=%0d", n_dp, n_overrun, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
