// tb_ficr_pair: self-checking testbench of ficr_pair.
//
// Sends four random frames on the line, one bit every second cycle, with the
// framing pulse on the first bit of each frame. While frame n+1 fills one
// register, the testbench shifts the other out and checks that it presents
// frame n bit by bit, bit 1 first, and that it is empty (all zeros) after F
// shifts. The frames are kept in the testbench, independently of the block.
module tb_ficr_pair;
  localparam int unsigned F  = ptdm_pkg::FRAME_BITS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic line_bit = 1'b0, line_bit_en = 1'b0, frame_pulse = 1'b0, route_shift = 1'b0;
  logic vertical;

  int checks = 0, failures = 0;
  logic [F-1:0] frames [5];

  always #5 clk = ~clk;

  ficr_pair dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic send_frame(input int n);
    for (int b = 0; b < int'(F); b++) begin
      @(negedge clk);
      line_bit_en = 1'b1;
      line_bit    = frames[n][b];
      frame_pulse = (b == 0);
      @(negedge clk);
      line_bit_en = 1'b0;
      frame_pulse = 1'b0;
    end
  endtask

  task automatic route_frame(input int n);
    repeat (3) @(negedge clk);
    for (int b = 0; b < int'(F); b++) begin
      check(vertical, frames[n][b], $sformatf("frame %0d bit %0d", n, b + 1));
      route_shift = 1'b1;
      @(negedge clk);
      route_shift = 1'b0;
    end
    check(vertical, 1'b0, "register empty after the pass");
  endtask

  initial begin
    for (int n = 0; n < 5; n++)
      for (int b = 0; b < int'(F); b++) frames[n][b] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(vertical, 1'b0, "full register empty after reset");
    send_frame(0);
    for (int n = 1; n < 5; n++) begin
      fork
        send_frame(n);
        route_frame(n - 1);
      join
    end
    // Last framing pulse alone: frame 4 becomes the full register.
    @(negedge clk);
    frame_pulse = 1'b1;
    @(negedge clk);
    frame_pulse = 1'b0;
    route_frame(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
