// tb_ptdm_call_modes: the three kinds of call a PTDM switch serves, run
// through a small serial matrix (F = 16 bits, 3 inputs, 2 outputs).
//
//   circuit  : line 0 slots 0..3 -> line 1 slots 8..11, unchanged all run;
//   packet   : line 1 -> line 0 at zero bandwidth, raised to the whole frame
//              (slot j -> slot 15-j) for frame 2 only, then zero again, and a
//              second 4-bit burst in frame 5;
//   variable : line 2 -> line 1 at 2 slots, raised to 6 slots from frame 3,
//              torn down from frame 6.
//
// Changes are written between frames, while every permuter is idle, through
// the XPTR and control-store ports: for each (i,k) pair that changed, its store
// words and then XPTR(i,k). Each outgoing frame is compared with a reference
// computed from the map in force for that frame. The run also checks that a
// call at zero bandwidth contributes nothing and that the matrix works at a
// size other than the default.
module tb_ptdm_call_modes;
  localparam int F   = 16;
  localparam int NI  = 3;
  localparam int NO  = 2;
  localparam int W   = $clog2(F);
  localparam int S   = 6;          // clocks per line bit
  localparam int P   = F * S;      // frame time in clocks
  localparam int OFF = 2;
  localparam int MOE_PH = 50;
  localparam int NFR = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NI-1:0] in_bit = '0, in_bit_en = '0, in_frame = '0;
  logic moe = 1'b0, out_bit_en = 1'b0;
  logic [NO-1:0] out_bit, out_frame, slip, out_dp;
  logic [NI-1:0] overrun, routing;
  logic xptr_we = 1'b0, xptr_ready;
  logic [$clog2(NI)-1:0] xptr_i = '0;
  logic [$clog2(NO)-1:0] xptr_k = '0;
  logic [F-1:0] xptr_data = '0;
  logic pst_we = 1'b0, pst_ready;
  logic [$clog2(NI)-1:0] pst_i = '0;
  logic [$clog2(NO)-1:0] pst_k = '0;
  logic [$clog2(F)-1:0] pst_addr = '0, pst_data = '0;

  ptdm_serial_matrix #(.F(F), .NI(NI), .NO(NO)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, t0 = -1;
  int dk [NI][F];
  int dl [NI][F];
  int n_ok = 0, n_changes = 0, n_overrun = 0, n_packet_bits = 0;

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

  function automatic logic in_data(input int n, input int i, input int j);
    int unsigned h;
    h = (n * 7919 + i * 104729 + j * 31337 + 999) * 32'd2654435761;
    h = h ^ (h >> 15);
    return h[9];
  endfunction

  always @(negedge clk) begin
    cyc <= cyc + 1;
    in_bit_en = '0; in_frame = '0; moe = 1'b0; out_bit_en = 1'b0;
    if (t0 >= 0) begin
      for (int i = 0; i < NI; i++) begin
        int t;
        t = cyc - t0 - i * OFF;
        if (t >= 0 && (t % S) == 0) begin
          in_bit_en[i] = 1'b1;
          in_bit[i]    = in_data(t / P, i, (t / S) % F);
          in_frame[i]  = ((t / S) % F) == 0;
        end
      end
      if (cyc >= t0 && ((cyc - t0) % P) == MOE_PH) moe = 1'b1;
      if (cyc >= t0 && ((cyc - t0) % S) == 3) out_bit_en = 1'b1;
    end
  end

  logic [F-1:0] exp_q [NO][$];
  logic [F-1:0] cap [NO];
  int cap_n [NO];

  function automatic logic [F-1:0] ref_frame(input int n, input int k);
    logic [F-1:0] o;
    o = '0;
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < F; j++)
        if (dk[i][j] == k) o[dl[i][j]] = in_data(n, i, j);
    return o;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NI; i++) if (overrun[i]) n_overrun++;
      for (int k = 0; k < NO; k++) begin
        if (out_frame[k]) cap_n[k] = 0;
        if (out_bit_en && cap_n[k] < F) begin
          cap[k][cap_n[k]] = out_bit[k];
          cap_n[k]++;
          if (cap_n[k] == F) begin
            if (exp_q[k].size() == 0) check(1'b0, "frame with no reference");
            else begin
              logic [F-1:0] e;
              e = exp_q[k].pop_front();
              check(cap[k] == e, $sformatf("line %0d frame: got %h expected %h", k, cap[k], e));
              if (cap[k] == e) n_ok++;
            end
          end
        end
      end
    end
  end

  // Control writes for a whole (i,k) pair: store words, then XPTR(i,k).
  task automatic program_pair(input int i, input int k);
    logic [F-1:0] v;
    for (int j = 0; j < F; j++) begin
      v[j] = (dk[i][j] == k);
      if (v[j]) begin
        @(negedge clk);
        pst_we = 1'b1; pst_i = i[$clog2(NI)-1:0]; pst_k = k[$clog2(NO)-1:0];
        pst_addr = j[W-1:0]; pst_data = dl[i][j][W-1:0];
        @(posedge clk);
        while (!pst_ready) @(posedge clk);
        @(negedge clk);
        pst_we = 1'b0;
      end
    end
    @(negedge clk);
    xptr_we = 1'b1; xptr_i = i[$clog2(NI)-1:0]; xptr_k = k[$clog2(NO)-1:0]; xptr_data = v;
    @(posedge clk);
    while (!xptr_ready) @(posedge clk);
    @(negedge clk);
    xptr_we = 1'b0;
    n_changes++;
  endtask

  task automatic clear_pair(input int i, input int k);
    for (int j = 0; j < F; j++) if (dk[i][j] == k) dk[i][j] = -1;
  endtask

  // Map in force for frame n, applied before frame n is routed.
  task automatic apply_map(input int n);
    // packet call: line 1 -> line 0
    if (n == 0 || n == 2 || n == 3 || n == 5 || n == 6) begin
      clear_pair(1, 0);
      if (n == 2) for (int j = 0; j < F; j++) begin dk[1][j] = 0; dl[1][j] = F - 1 - j; end
      if (n == 5) for (int j = 4; j < 8; j++) begin dk[1][j] = 0; dl[1][j] = j + 8; end
      program_pair(1, 0);
    end
    // variable-rate call: line 2 -> line 1, slots 0.. of line 1
    if (n == 0 || n == 3 || n == 6) begin
      clear_pair(2, 1);
      if (n == 0) for (int j = 0; j < 2; j++) begin dk[2][j + 5] = 1; dl[2][j + 5] = j; end
      if (n == 3) for (int j = 0; j < 6; j++) begin dk[2][j + 5] = 1; dl[2][j + 5] = j; end
      program_pair(2, 1);
    end
    // circuit call: line 0 -> line 1 slots 8..11, set up once
    if (n == 0) begin
      for (int j = 0; j < 4; j++) begin dk[0][j] = 1; dl[0][j] = 8 + j; end
      program_pair(0, 1);
    end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) for (int j = 0; j < F; j++) dk[i][j] = -1;
    for (int k = 0; k < NO; k++) cap_n[k] = F;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    apply_map(0);
    @(negedge clk);
    t0 = cyc + S;
    for (int n = 0; n < NFR; n++) begin
      // Frame n is fully permuted 2F+4 clocks after the last line's pulse.
      wait (cyc == t0 + (n + 1) * P + (NI - 1) * OFF + 2 * F + 6);
      for (int k = 0; k < NO; k++) exp_q[k].push_back(ref_frame(n, k));
      for (int j = 0; j < F; j++) if (dk[1][j] == 0) n_packet_bits++;
      if (n + 1 < NFR) apply_map(n + 1);
      check(cyc < t0 + (n + 2) * P, "changes fit between frames");
    end
    wait (cyc == t0 + (NFR + 1) * P + MOE_PH - 2);
    $display("frames ok=%0d changes=%0d packet_bits=%0d overruns=%0d", n_ok, n_changes, n_packet_bits, n_overrun);
    check(n_ok == NFR * NO, "all frames delivered");
    check(n_packet_bits == F + 4, "packet call carried F + 4 bits in all");
    check(n_overrun == 0, "no frames lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
