// route_column: the ROUTE (R) primitive of one incoming line i.
//
// It holds the line's FICR pair, the O crosspoint control registers
// XPTR(i,1..O), the O crosspoints and the shift counter that ends a routing
// pass. After a framing pulse has swapped a complete frame into the full FICR,
// a pass shifts the FICR and every XPTR(i,k) F times in synchronism (one bit
// per clock). Crosspoint k is a 2-input AND gate: it passes the bit on the
// vertical to PFR(i,k) when the bit of XPTR(i,k) at its output end is 1, so
// XPTR(i,k) bit j = 1 routes frame bit j to PFR(i,k) in the same bit position
// (eq. 5.4 of the design). A bit that is not routed reaches the PFR as 0. The
// PFRs themselves live in the permuters; this block drives their serial input
// (pfr_bit) and shift enable (pfr_shift).
//
// Following the design, the counter ends the pass and sets 'data present' on
// the column's PFRs (one-cycle pulse data_present, the cycle after the last
// shift). Choices of this design, where the document gives no detail:
//   * XPTR registers are end-around shift registers, so after the F shifts of
//     a pass they are back at their home position and keep the route with no
//     processor action.
//   * A pass starts only when no permuter of the column still holds its PFR
//     (perm_busy all zero); until then the frame waits in the full FICR.
//   * Overrun: a framing pulse while a frame is still waiting loses the
//     waiting frame; one during a pass (before its last shift) loses both
//     frames involved (the pass runs to its end to keep the XPTRs aligned,
//     but data_present is withheld). Each case gives a one-cycle `overrun`
//     pulse. A framing pulse in the last cycle of a pass is no overrun.
//   * The control processor writes a whole XPTR(i,k) through the xptr_* port;
//     writes are accepted (xptr_ready) whenever no pass is running.
//
// Latency: a pass takes F cycles; data_present follows the last shift by one
// cycle. Reset (synchronous, active low) clears every XPTR, i.e. no routes;
// the first framing pulse after reset only starts filling, as no complete
// frame precedes it.
module route_column #(
  parameter int unsigned F  = ptdm_pkg::FRAME_BITS,
  parameter int unsigned NO = ptdm_pkg::NUM_OUT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // incoming line
  input  logic                  line_bit,
  input  logic                  line_bit_en,
  input  logic                  frame_pulse,
  // towards the PFRs of the column's permuters
  input  logic [NO-1:0]         perm_busy,     // PFR(i,k) still holds data
  output logic [NO-1:0]         pfr_bit,       // crosspoint outputs
  output logic                  pfr_shift,     // shift the PFRs
  output logic                  data_present,  // pass complete: start permuters
  // XPTR write port of the control processor
  input  logic                  xptr_we,
  input  logic [$clog2(NO)-1:0] xptr_k,
  input  logic [F-1:0]          xptr_data,     // bit j-1 = route frame bit j
  output logic                  xptr_ready,
  // status
  output logic                  routing,       // a pass is running
  output logic                  overrun        // a frame was lost
);

  localparam int unsigned CW = $clog2(F);

  logic [F-1:0]  xptr_q [NO];
  logic          pending_q;   // a complete frame waits in the full FICR
  logic          seen_q;      // a framing pulse was seen since reset
  logic          routing_q;
  logic          bad_q;       // current pass was overrun
  logic [CW-1:0] cnt_q;
  logic          dp_q;
  logic          vertical;
  logic          start;
  logic          last;

  ficr_pair #(.F(F)) u_ficr (
    .clk         (clk),
    .rst_n       (rst_n),
    .line_bit    (line_bit),
    .line_bit_en (line_bit_en),
    .frame_pulse (frame_pulse),
    .route_shift (routing_q),
    .vertical    (vertical)
  );

  assign start        = pending_q && !routing_q && !dp_q && !frame_pulse && (perm_busy == '0);
  assign last         = routing_q && (cnt_q == CW'(F - 1));
  assign pfr_shift    = routing_q;
  assign data_present = dp_q;
  assign routing      = routing_q;
  assign xptr_ready   = !routing_q;
  assign overrun      = frame_pulse && (pending_q || (routing_q && !last));

  // Crosspoints: 2-input AND of the vertical and the XPTR output bit.
  always_comb begin
    for (int k = 0; k < NO; k++) pfr_bit[k] = vertical & xptr_q[k][0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending_q <= 1'b0;
      seen_q    <= 1'b0;
      routing_q <= 1'b0;
      bad_q     <= 1'b0;
      cnt_q     <= '0;
      dp_q      <= 1'b0;
      for (int k = 0; k < NO; k++) xptr_q[k] <= '0;
    end else begin
      dp_q <= last && !bad_q;

      // Frame bookkeeping.
      if (frame_pulse) seen_q <= 1'b1;
      if (frame_pulse && !seen_q) begin
        pending_q <= 1'b0;            // nothing was received before it
      end else if (frame_pulse) begin
        if (routing_q && !last) begin
          pending_q <= 1'b0;
          bad_q     <= 1'b1;
        end else begin
          pending_q <= 1'b1;
        end
      end else if (start) begin
        pending_q <= 1'b0;
      end

      // Routing pass and its counter.
      if (start) begin
        routing_q <= 1'b1;
        bad_q     <= 1'b0;
        cnt_q     <= '0;
      end else if (routing_q) begin
        cnt_q <= cnt_q + 1'b1;
        if (last) routing_q <= 1'b0;
      end

      // XPTRs: end-around shift during a pass, processor write otherwise.
      for (int k = 0; k < NO; k++) begin
        if (routing_q)
          xptr_q[k] <= {xptr_q[k][0], xptr_q[k][F-1:1]};
        else if (xptr_we && (xptr_k == $clog2(NO)'(k)))
          xptr_q[k] <= xptr_data;
      end
    end
  end

  // A pass must never start while a PFR of the column is still in use.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> (perm_busy == '0));
  // data_present is a single-cycle pulse.
  assert property (@(posedge clk) disable iff (!rst_n) data_present |=> !data_present);

endmodule
