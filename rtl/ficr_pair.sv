// ficr_pair: swinging pair of Frame Input Copy Registers (FICR) of one
// incoming line.
//
// Two F-bit shift registers take turns. The "filling" register shifts in the
// serial line one bit per line_bit_en strobe; the other one ("full") holds the
// last complete frame and is shifted out onto the line's vertical data path,
// one bit per route_shift, by the routing pass. A framing pulse swaps the two
// roles, so the register just filled becomes the full one and the other starts
// receiving the next frame. This double buffering is the document's; the
// cycle-level conventions below are this design's own.
//
// Bit order: the first bit of a frame to arrive is bit 1. Registers shift
// toward index 0, so after F strobes bit j sits at index j-1, and the full
// register presents bit 1, 2, ... F on `vertical` in that order.
//
// Timing: a framing pulse marks the first bit of a new frame. If line_bit_en is
// high in the same cycle, that bit already goes into the newly empty register.
// `vertical` is combinational from the full register; route_shift advances it
// at the clock edge. Shifting out fills the register with zeros.
//
// If a frame arrives while the previous one is still being routed, the two
// operations meet in one register; the routing column detects that case and
// discards the frames involved.
module ficr_pair #(
  parameter int unsigned F = ptdm_pkg::FRAME_BITS
) (
  input  logic clk,
  input  logic rst_n,        // active-low synchronous reset
  input  logic line_bit,     // serial data of the incoming line
  input  logic line_bit_en,  // line_bit is valid in this cycle
  input  logic frame_pulse,  // framing pulse: swap the pair
  input  logic route_shift,  // shift the full register one bit
  output logic vertical      // bit of the full register on the vertical
);

  logic [F-1:0] ficr_q [2];
  logic         fill_sel_q;  // index of the register that is filling
  logic         fill_sel;    // filling register for the bit of this cycle

  assign fill_sel = frame_pulse ? ~fill_sel_q : fill_sel_q;
  assign vertical = ficr_q[~fill_sel_q][0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ficr_q[0]  <= '0;
      ficr_q[1]  <= '0;
      fill_sel_q <= 1'b0;
    end else begin
      if (frame_pulse) fill_sel_q <= ~fill_sel_q;
      for (int r = 0; r < 2; r++) begin
        logic fill_now, out_now;
        fill_now = line_bit_en && (fill_sel == 1'(r));
        out_now  = route_shift && (fill_sel_q != 1'(r));
        if (fill_now || out_now)
          ficr_q[r] <= {fill_now ? line_bit : 1'b0, ficr_q[r][F-1:1]};
      end
    end
  end

endmodule
