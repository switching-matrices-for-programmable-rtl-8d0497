// tb_rotating_store: self-checking testbench of rotating_store.
//
// Checks that after reset the store reads out the identity P(j) = j over F
// rotations, that random words written by address are read out in word order
// over F rotations, that the store is back at its home position after F
// rotations (a second round reads the same sequence), that a write in a
// rotating cycle is ignored, and that a single rewritten word changes only
// that step.
module tb_rotating_store;
  localparam int unsigned F  = ptdm_pkg::FRAME_BITS;
  localparam int unsigned W = $clog2(F);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rotate = 1'b0, we = 1'b0;
  logic [$clog2(F)-1:0] waddr = '0;
  logic [W-1:0] wdata = '0;
  logic [W-1:0] head;

  int checks = 0, failures = 0;
  logic [W-1:0] model [F];

  always #5 clk = ~clk;

  rotating_store dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic read_round(input string what);
    for (int j = 0; j < int'(F); j++) begin
      check(head == model[j], $sformatf("%s word %0d: got %0d expected %0d", what, j, head, model[j]));
      rotate = 1'b1;
      @(negedge clk);
      rotate = 1'b0;
    end
  endtask

  task automatic write_word(input int a, input logic [W-1:0] d);
    waddr = a[$clog2(F)-1:0];
    wdata = d;
    we    = 1'b1;
    model[a] = d;
    @(negedge clk);
    we    = 1'b0;
  endtask

  initial begin
    for (int j = 0; j < int'(F); j++) model[j] = W'(j);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    read_round("identity");
    for (int j = 0; j < int'(F); j++) write_word(j, W'($urandom));
    read_round("random");
    read_round("second round");
    // A write together with a rotation is ignored.
    waddr = '0; wdata = ~model[0]; we = 1'b1; rotate = 1'b1;
    @(negedge clk);
    we = 1'b0; rotate = 1'b0;
    // Bring the store home again (F-1 more rotations).
    repeat (F - 1) begin rotate = 1'b1; @(negedge clk); end
    rotate = 1'b0;
    read_round("after ignored write");
    write_word(17, ~model[17]);
    read_round("one word rewritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
