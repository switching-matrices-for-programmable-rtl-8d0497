// tb_ptdm_serial_matrix: end-to-end self-checking testbench of the serial
// switching matrix, at the default sizes (F = 200 bits, 10 x 10 lines).
//
// Traffic: every incoming line carries back-to-back frames, one bit every
// S = 3 clocks, with the lines offset from each other by 4 clocks; frame bits
// come from a hash of (frame, line, bit). Calls: a random one-to-one map from
// input bits (i,j) to output slots (k,l), about 70 % of the input bits in use,
// is loaded through the XPTR and control-store write ports. Between frames,
// in the interval where every permuter is idle, a call on one (i,k) pair has
// its bandwidth changed (a few bits added or torn down) by rewriting XPTR(i,k)
// and the affected store words, as the control processor would.
//
// Reference: for each frame n the testbench computes every outgoing frame
// directly from the map in force for that frame: out(k)[l] = in(i)[j] for each
// used (i,j) -> (k,l). The Master Output Event comes once per frame time. Each
// outgoing frame, taken from the line after out_frame, must equal the
// reference, in order. Also checked: FAR data present comes exactly 2F+4
// clocks after the last framing pulse of a frame (routing F+2, permuting F+2).
//
// Mechanisms counted and required at least once: routing passes, permuters
// waiting for their FAR, routing passes waiting for busy PFRs, slips (event
// without a complete frame, at start-up), overruns (forced at the end by
// stopping the Master Output Event), XPTR writes held off during a pass, and
// call changes.
module tb_ptdm_serial_matrix;
  import ptdm_pkg::*;

  localparam int F   = int'(FRAME_BITS);
  localparam int NI  = int'(NUM_IN);
  localparam int NO  = int'(NUM_OUT);
  localparam int W   = $clog2(F);
  localparam int S   = 3;              // clocks per line bit
  localparam int P   = F * S;          // frame time in clocks
  localparam int OFF = 4;              // offset between successive lines
  localparam int MOE_PH = 220;         // event phase within the frame time
  localparam int NFR = 9;              // frames checked end to end

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

  ptdm_serial_matrix dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, t0 = -1;
  bit moe_on = 1'b1, checking = 1'b1;

  // Call map: input bit (i,j) -> output slot (k,l); k = -1 when unused.
  int dk [NI][F];
  int dl [NI][F];
  bit used [NO][F];

  // Mechanism counters.
  int n_pass = 0, n_perm_wait = 0, n_route_wait = 0, n_slip = 0, n_overrun = 0;
  int n_held = 0, n_change = 0, n_frames_ok = 0, n_lat = 0;

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

  function automatic logic in_data(input int n, input int i, input int j);
    int unsigned h;
    h = (n * 7919 + i * 104729 + j * 31337 + 12345) * 32'd2654435761;
    h = h ^ (h >> 15);
    return h[7];
  endfunction

  // ---------------------------------------------------------------- lines --
  always @(negedge clk) begin
    cyc <= cyc + 1;
    in_bit_en = '0;
    in_frame  = '0;
    moe       = 1'b0;
    out_bit_en = 1'b0;
    if (t0 >= 0) begin
      for (int i = 0; i < NI; i++) begin
        int t;
        t = cyc - t0 - i * OFF;
        if (t >= 0 && (t % S) == 0) begin
          int b, n;
          b = (t / S) % F;
          n = t / P;
          in_bit_en[i] = 1'b1;
          in_bit[i]    = in_data(n, i, b);
          in_frame[i]  = (b == 0);
        end
      end
      if (moe_on && cyc >= t0 && ((cyc - t0) % P) == MOE_PH) moe = 1'b1;
      if (cyc >= t0 && ((cyc - t0) % S) == 1) out_bit_en = 1'b1;
    end
  end

  // ------------------------------------------------------- reference model --
  logic [F-1:0] exp_q [NO][$];

  function automatic logic [F-1:0] ref_frame(input int n, input int k);
    logic [F-1:0] o;
    o = '0;
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < F; j++)
        if (dk[i][j] == k) o[dl[i][j]] = in_data(n, i, j);
    return o;
  endfunction

  // --------------------------------------------------------- output check --
  logic [F-1:0] cap [NO];
  int cap_n [NO];
  int last_pulse = 0;
  logic [NO-1:0] dp_d = '0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_frame[NI-1]) last_pulse <= cyc;
      dp_d <= out_dp;
      for (int k = 0; k < NO; k++) begin
        if (out_dp[k] && !dp_d[k] && checking && t0 >= 0) begin
          n_lat++;
          check(cyc - last_pulse == 2 * F + 4,
                $sformatf("data present %0d clocks after the framing pulse", cyc - last_pulse));
        end
        if (out_frame[k]) cap_n[k] = 0;
        if (out_bit_en && cap_n[k] < F) begin
          cap[k][cap_n[k]] = out_bit[k];
          cap_n[k]++;
          if (cap_n[k] == F && checking) begin
            if (exp_q[k].size() == 0) check(1'b0, "outgoing frame with no reference");
            else begin
              logic [F-1:0] e;
              e = exp_q[k].pop_front();
              check(cap[k] == e, $sformatf("outgoing frame on line %0d", k));
              if (cap[k] == e) n_frames_ok++;
            end
          end
        end
      end
      for (int i = 0; i < NI; i++) if (overrun[i]) n_overrun++;
      for (int k = 0; k < NO; k++) if (slip[k]) n_slip++;
      if (xptr_we && !xptr_ready) n_held++;
    end
  end

  for (genvar i = 0; i < NI; i++) begin : g_mon
    // Routing passes, and frames waiting for busy PFRs.
    always @(posedge clk)
      if (rst_n) begin
        if (dut.g_col[i].u_route.data_present) n_pass++;
        if (dut.g_col[i].u_route.pending_q && !routing[i] &&
            dut.g_col[i].u_route.perm_busy != '0) n_route_wait++;
      end
    // Permuters waiting in 'data present' for their FAR.
    for (genvar k = 0; k < NO; k++) begin : g_mon_k
      always @(posedge clk)
        if (rst_n && dut.g_col[i].g_perm[k].u_perm.state_q == PERM_DP &&
            !dut.g_col[i].g_perm[k].u_perm.far_free) n_perm_wait++;
    end
  end

  // ------------------------------------------------------ control writes --
  task automatic write_xptr(input int i, input int k);
    logic [F-1:0] v;
    for (int j = 0; j < F; j++) v[j] = (dk[i][j] == k);
    @(negedge clk);
    xptr_we = 1'b1; xptr_i = i[$clog2(NI)-1:0]; xptr_k = k[$clog2(NO)-1:0]; xptr_data = v;
    @(posedge clk);
    while (!xptr_ready) @(posedge clk);
    @(negedge clk);
    xptr_we = 1'b0;
  endtask

  task automatic write_store(input int i, input int k, input int j, input int l);
    @(negedge clk);
    pst_we = 1'b1; pst_i = i[$clog2(NI)-1:0]; pst_k = k[$clog2(NO)-1:0];
    pst_addr = j[W-1:0]; pst_data = l[W-1:0];
    @(posedge clk);
    while (!pst_ready) @(posedge clk);
    @(negedge clk);
    pst_we = 1'b0;
  endtask

  // Change the bandwidth of the call on (i,k): add or tear down a few bits.
  task automatic change_call();
    int i, k;
    int changed [$];
    i = int'($urandom % NI);
    k = int'($urandom % NO);
    for (int m = 0; m < 4; m++) begin
      int j;
      j = int'($urandom % F);
      if (dk[i][j] == k) begin
        used[k][dl[i][j]] = 1'b0;
        dk[i][j] = -1;
        changed.push_back(j);
      end else if (dk[i][j] < 0) begin
        int l;
        l = int'($urandom % F);
        while (used[k][l]) l = (l + 1) % F;
        used[k][l] = 1'b1;
        dk[i][j] = k; dl[i][j] = l;
        changed.push_back(j);
      end
    end
    foreach (changed[c])
      if (dk[i][changed[c]] == k) write_store(i, k, changed[c], dl[i][changed[c]]);
    write_xptr(i, k);
    n_change++;
  endtask

  // -------------------------------------------------------------- sequence --
  initial begin
    int slots [NI * F];
    for (int k = 0; k < NO; k++) for (int l = 0; l < F; l++) used[k][l] = 1'b0;
    for (int q = 0; q < NI * F; q++) slots[q] = q;
    for (int q = NI * F - 1; q > 0; q--) begin
      int r, t;
      r = int'($urandom % (q + 1));
      t = slots[q]; slots[q] = slots[r]; slots[r] = t;
    end
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < F; j++) begin
        int s;
        s = slots[i * F + j];
        if (($urandom % 10) < 7) begin
          dk[i][j] = s / F; dl[i][j] = s % F;
          used[s / F][s % F] = 1'b1;
        end else dk[i][j] = -1;
      end
    for (int k = 0; k < NO; k++) cap_n[k] = F;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Initial configuration.
    for (int i = 0; i < NI; i++)
      for (int k = 0; k < NO; k++) begin
        for (int j = 0; j < F; j++) if (dk[i][j] == k) write_store(i, k, j, dl[i][j]);
        write_xptr(i, k);
      end
    @(negedge clk);
    t0 = (cyc + 2) - ((cyc + 2) % S) + S;

    // Frame n is complete on all lines at t0 + (n+1)P + (NI-1)*OFF and fully
    // permuted 2F+4 clocks later; frame n+1 starts routing at t0 + (n+2)P.
    for (int n = 0; n < NFR; n++) begin
      wait (cyc == t0 + (n + 1) * P + (NI - 1) * OFF + 2 * F + 10);
      for (int k = 0; k < NO; k++) exp_q[k].push_back(ref_frame(n, k));
      if (n % 3 != 0) change_call();
      if (n == 4) begin
        // A write that must wait for the end of a routing pass; it rewrites
        // XPTR(0,0) with its current value, so the traffic is unchanged.
        wait (routing[0]);
        write_xptr(0, 0);
      end
    end
    // Let the checked frames leave the switch.
    wait (cyc == t0 + (NFR + 1) * P + MOE_PH + P + 5);
    checking = 1'b0;
    // Stop the Master Output Event: frames back up and are lost.
    moe_on = 1'b0;
    repeat (4 * P) @(negedge clk);

    $display("frames checked=%0d passes=%0d perm_waits=%0d route_waits=%0d slips=%0d overruns=%0d held_writes=%0d call_changes=%0d latency_checks=%0d",
             n_frames_ok, n_pass, n_perm_wait, n_route_wait, n_slip, n_overrun, n_held, n_change, n_lat);
    check(n_frames_ok == NFR * NO, "every checked frame arrived intact");
    check(n_pass > 0, "routing passes happened");
    check(n_perm_wait > 0, "a permuter waited for its FAR");
    check(n_route_wait > 0, "a routing pass waited for busy PFRs");
    check(n_slip > 0, "a slip happened");
    check(n_overrun > 0, "an overrun happened");
    check(n_held > 0, "an XPTR write was held off");
    check(n_change > 0, "calls were changed");
    check(n_lat > 0, "latency was measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
