// permuter: the PERMUTE (P) primitive for one partial frame (i,k).
//
// It holds the Partial Frame Register PFR(i,k), the rotating control store
// with P(j) in word j, a one-out-of-F decoder and F selection AND gates whose
// outputs form the bus to the Frame Assembly Register FAR(k). The routing pass
// fills the PFR serially (pfr_in / pfr_shift, bit 1 first). On 'data present'
// (start) the permuter shifts the PFR out, bit j at step j, while the control
// store rotates in step; the decoder turns the store word P(j) into one line of
// the bus and the AND gate of that line passes bit j, so bit j lands in bit
// P(j) of FAR(k). FAR(k) ORs the buses of all its permuters. A store word of
// F or more drives no bus line, so that bit is dropped.
//
// This structure and the step order follow the design. This design's own
// choices: one step per clock; a permuter with data present waits (state
// PERM_DP) while far_free is low, i.e. while FAR(k) still holds this
// permuter's part of the previous frame; the store is written through the
// st_* port by word number whenever the permuter is not running (st_ready).
//
// Timing: a permutation takes F cycles (PERM_RUN) and starts the cycle after
// start if far_free is high. `bus` is combinational from the PFR and store and
// is non-zero only in PERM_RUN; `done` is high in the last of the F steps,
// together with the last bus value. `busy` is high while the PFR holds data.
module permuter #(
  parameter int unsigned F = ptdm_pkg::FRAME_BITS,
  parameter int unsigned W = $clog2(F)
) (
  input  logic                 clk,
  input  logic                 rst_n,      // active-low synchronous reset
  // from the routing column
  input  logic                 pfr_in,     // crosspoint output
  input  logic                 pfr_shift,  // routing pass shifts the PFR
  input  logic                 start,      // 'data present' on the PFR
  // towards FAR(k)
  input  logic                 far_free,   // FAR(k) can take this permuter's part
  output logic [F-1:0]         bus,        // bit lines to FAR(k), ORed there
  output logic                 done,       // last step of the permutation
  output logic                 busy,       // PFR holds data
  // control store write port of the control processor
  input  logic                 st_we,
  input  logic [$clog2(F)-1:0] st_addr,    // word number j-1
  input  logic [W-1:0]         st_data,    // P(j)-1 in binary
  output logic                 st_ready
);

  import ptdm_pkg::*;

  localparam int unsigned CW = $clog2(F);

  perm_state_e   state_q;
  logic [F-1:0]  pfr_q;
  logic [CW-1:0] step_q;
  logic [W-1:0]  word;
  logic          run;

  assign run      = (state_q == PERM_RUN);
  assign done     = run && (step_q == CW'(F - 1));
  assign busy     = (state_q != PERM_IDLE);
  assign st_ready = !run;

  rotating_store #(.F(F), .W(W)) u_store (
    .clk    (clk),
    .rst_n  (rst_n),
    .rotate (run),
    .we     (st_we && !run),
    .waddr  (st_addr),
    .wdata  (st_data),
    .head   (word)
  );

  // One-out-of-F decoder and the selection AND gates.
  // A shift of a single 1 by the store word is the decoder; words of F or
  // more shift it out of range.
  assign bus = (run && pfr_q[0]) ? (F'(1) << word) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= PERM_IDLE;
      pfr_q   <= '0;
      step_q  <= '0;
    end else begin
      if (pfr_shift)
        pfr_q <= {pfr_in, pfr_q[F-1:1]};
      else if (run)
        pfr_q <= {1'b0, pfr_q[F-1:1]};

      unique case (state_q)
        PERM_IDLE: if (start) state_q <= PERM_DP;
        PERM_DP: if (far_free) begin
          state_q <= PERM_RUN;
          step_q  <= '0;
        end
        PERM_RUN: begin
          step_q <= step_q + 1'b1;
          if (done) state_q <= PERM_IDLE;
        end
        default: state_q <= PERM_IDLE;
      endcase
    end
  end

  // The routing column must not refill a PFR that is still in use.
  assert property (@(posedge clk) disable iff (!rst_n) pfr_shift |-> (state_q == PERM_IDLE));
  assert property (@(posedge clk) disable iff (!rst_n) start |-> (state_q == PERM_IDLE));

endmodule
