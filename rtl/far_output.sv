// far_output: Frame Assembly Register FAR(k) and the output side of one
// outgoing line k.
//
// FAR(k) collects the permuted partial frames of all I permuters (i,k) that
// home on it: in every cycle it ORs in their buses (the union of eq. 5.3 of
// the design). It keeps one 'finished' flag per permuter; when all I have
// finished, 'data present' is set on the FAR. A Master Output Event (moe, a
// pulse at the frame rate R) that finds data present copies FAR(k) into the
// Frame Output Copy Register (FOCR), clears the FAR and its flags, and the
// FOCR is shifted out on the outgoing line, bit 1 first, one bit per
// out_bit_en strobe. The FAR/FOCR pair and the moe-AND-data-present rule are
// the design's; the rest is this design's own:
//   * far_free[i] is low while permuter i has finished for the frame now in
//     the FAR, so a permuter that is early for the next frame waits instead of
//     mixing two frames;
//   * a moe without data present sends nothing new (the line carries zeros
//     once the FOCR is empty) and raises `slip` for one cycle; the FAR keeps
//     collecting and is sent at a later moe.
//
// Timing: `out_bit` is FOCR bit 1 combinationally; out_frame is a one-cycle
// pulse in the cycle after the FOCR was loaded, i.e. when bit 1 of the new
// frame is on out_bit. A load takes precedence over a shift in the same cycle.
module far_output #(
  parameter int unsigned F  = ptdm_pkg::FRAME_BITS,
  parameter int unsigned NI = ptdm_pkg::NUM_IN
) (
  input  logic          clk,
  input  logic          rst_n,        // active-low synchronous reset
  // from the permuters (i,k), i = 0..NI-1
  input  logic [F-1:0]  bus [NI],
  input  logic [NI-1:0] done,
  output logic [NI-1:0] far_free,
  // output line
  input  logic          moe,          // Master Output Event
  input  logic          out_bit_en,   // line-rate strobe of the outgoing line
  output logic          out_bit,
  output logic          out_frame,    // first bit of a new frame on out_bit
  // status
  output logic          data_present, // all permuters have delivered
  output logic          slip          // moe found no complete frame
);

  logic [F-1:0]  far_q;
  logic [F-1:0]  focr_q;
  logic [NI-1:0] fin_q;
  logic [F-1:0]  bus_or;
  logic          load;
  logic          out_frame_q;

  always_comb begin
    bus_or = '0;
    for (int i = 0; i < NI; i++) bus_or |= bus[i];
  end

  assign data_present = &fin_q;
  assign far_free     = ~fin_q;
  assign load         = moe && data_present;
  assign slip         = moe && !data_present;
  assign out_bit      = focr_q[0];
  assign out_frame    = out_frame_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      far_q       <= '0;
      focr_q      <= '0;
      fin_q       <= '0;
      out_frame_q <= 1'b0;
    end else begin
      out_frame_q <= load;
      if (load) begin
        focr_q <= far_q;
        far_q  <= '0;
        fin_q  <= '0;
      end else begin
        far_q <= far_q | bus_or;
        fin_q <= fin_q | done;
        if (out_bit_en) focr_q <= {1'b0, focr_q[F-1:1]};
      end
    end
  end

  // A permuter finishes at most once per frame held in the FAR.
  assert property (@(posedge clk) disable iff (!rst_n) (done & fin_q) == '0);

endmodule
