// tb_permuter: self-checking testbench of permuter (P primitive).
//
// For each test the testbench loads a random permutation P into the control
// store through the write port, shifts a random partial frame s into the PFR
// as the routing pass would, pulses start and ORs the bus into its own copy of
// the FAR. It then checks FAR bit P(j) = s(j) for every j, that the bus never
// has more than one line high, that done comes exactly F+1 cycles after start
// (one cycle to 'data present', F steps), that st_ready is low while running,
// and that busy covers the whole time the PFR holds data. Further tests:
// holding far_free low keeps the permuter waiting with a silent bus, a store
// word of F or more drops its bit, and a second frame through an unchanged
// store is permuted the same way (the store came back home).
module tb_permuter;
  localparam int unsigned F  = ptdm_pkg::FRAME_BITS;
  localparam int unsigned W = $clog2(F);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pfr_in = 1'b0, pfr_shift = 1'b0, start = 1'b0, far_free = 1'b1;
  logic [F-1:0] bus;
  logic done, busy, st_ready;
  logic st_we = 1'b0;
  logic [$clog2(F)-1:0] st_addr = '0;
  logic [W-1:0] st_data = '0;

  int checks = 0, failures = 0;
  int perm [F];
  logic [F-1:0] far;
  int cyc = 0, start_cyc = 0, done_cyc = -1, n_wait = 0;

  always #5 clk = ~clk;

  permuter dut (.*);

  initial begin : watchdog
    repeat (30000) @(posedge clk);
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

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      far <= far | bus;
      if ($countones(bus) > 1) check(1'b0, "more than one bus line high");
      if (done) done_cyc <= cyc;
      if (start) start_cyc <= cyc;
    end
  end

  task automatic load_perm(input bit with_drops);
    // Random permutation by shuffling, optionally with some dropped bits.
    for (int j = 0; j < int'(F); j++) perm[j] = j;
    for (int j = int'(F) - 1; j > 0; j--) begin
      int r, t;
      r = int'($urandom % (j + 1));
      t = perm[j]; perm[j] = perm[r]; perm[r] = t;
    end
    if (with_drops)
      for (int j = 0; j < int'(F); j += 7) perm[j] = int'(F) + ($urandom % (2**W - F));
    for (int j = 0; j < int'(F); j++) begin
      @(negedge clk);
      check(st_ready, "st_ready while idle");
      st_we = 1'b1; st_addr = j[$clog2(F)-1:0]; st_data = W'(perm[j]);
    end
    @(negedge clk);
    st_we = 1'b0;
  endtask

  task automatic run_frame(input logic [F-1:0] s, input int hold, input string what);
    logic [F-1:0] exp;
    exp = '0;
    for (int j = 0; j < int'(F); j++) if (perm[j] < int'(F)) exp[perm[j]] = s[j];
    // Routing pass: bit 1 first.
    for (int j = 0; j < int'(F); j++) begin
      @(negedge clk);
      pfr_shift = 1'b1; pfr_in = s[j];
    end
    @(negedge clk);
    pfr_shift = 1'b0; pfr_in = 1'b0;
    far = '0;
    far_free = (hold == 0);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (hold) begin
      check(busy && bus == '0 && !done, "waiting for a free FAR");
      n_wait++;
      @(negedge clk);
    end
    far_free = 1'b1;
    repeat (2) @(negedge clk);
    check(!st_ready, "st_ready low while running");
    while (busy) @(negedge clk);
    @(negedge clk);
    check(done_cyc - start_cyc == int'(F) + 1 + hold,
          $sformatf("%s: latency %0d", what, done_cyc - start_cyc));
    check(far == exp, $sformatf("%s: permuted frame", what));
    for (int l = 0; l < int'(F); l++) check(far[l] == exp[l], "FAR bit");
  endtask

  function automatic logic [F-1:0] rand_frame();
    logic [F-1:0] v;
    for (int b = 0; b < int'(F); b++) v[b] = 1'($urandom);
    return v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Reset store is the identity.
    for (int j = 0; j < int'(F); j++) perm[j] = j;
    run_frame(rand_frame(), 0, "identity after reset");
    load_perm(1'b0);
    run_frame(rand_frame(), 0, "random permutation");
    run_frame(rand_frame(), 0, "same store, next frame");
    run_frame(rand_frame(), 25, "FAR busy for 25 cycles");
    load_perm(1'b1);
    run_frame(rand_frame(), 0, "permutation with dropped bits");
    check(n_wait == 25, "wait cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
