// ptdm_serial_matrix: serial switching matrix for Programmable Time-Division
// Multiplexing (PTDM).
//
// I frame-formatted serial lines come in and O go out; every frame is F bits.
// The matrix realises O(k) = OR over i of P(i,k)[R(i,k) I(i)]: for each input
// line i a routing column (R primitive) splits the frame into O partial frames
// PFR(i,k), keeping bit positions; I*O permuters (P primitive) move the bits
// of each partial frame to their outgoing time slots; O frame assembly units
// OR the I permuted partial frames of each outgoing line into FAR(k) and, on
// the Master Output Event, send it. In steady state nothing else is needed:
// the XPTR registers and control stores rotate back to their home position
// after every frame. The control processor changes a call only by rewriting
// XPTR(i,k) (one F-bit word) and words of the control store of permuter (i,k).
// That organisation is the design's; clocking and the handshakes are this
// design's own (see the blocks).
//
// Interface:
//   in_bit/in_bit_en/in_frame  per input line: data, line-rate strobe and
//                              framing pulse (from external frame detection)
//   moe                        Master Output Event, one pulse per frame time
//   out_bit_en                 common line-rate strobe of the outgoing lines
//   out_bit/out_frame          per output line: data and first-bit marker
//   xptr_*                     write XPTR(xptr_i, xptr_k); taken when
//                              xptr_we && xptr_ready
//   pst_*                      write word pst_addr of the control store of
//                              permuter (pst_i, pst_k); taken when
//                              pst_we && pst_ready
//   overrun/slip/out_dp        status: input frame lost, output event without
//                              a complete frame, FAR data present
//   routing                    status: routing pass running on line i
//
// Timing, with one shift per clock: a frame is routed F cycles after its
// routing pass starts, permuted in another F cycles (plus one cycle for
// 'data present' and one to start), and is then waiting in FAR(k) for the
// next moe. The outgoing lines therefore lag the incoming ones by one frame
// time. Line strobes must be slower than the clock by enough that a frame
// (F strobes) takes longer than a routing pass plus a permutation, about
// 2F+4 cycles; otherwise frames are lost and reported by `overrun`.
module ptdm_serial_matrix #(
  parameter int unsigned F  = ptdm_pkg::FRAME_BITS,
  parameter int unsigned NI = ptdm_pkg::NUM_IN,
  parameter int unsigned NO = ptdm_pkg::NUM_OUT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // incoming lines
  input  logic [NI-1:0]         in_bit,
  input  logic [NI-1:0]         in_bit_en,
  input  logic [NI-1:0]         in_frame,
  // outgoing lines
  input  logic                  moe,
  input  logic                  out_bit_en,
  output logic [NO-1:0]         out_bit,
  output logic [NO-1:0]         out_frame,
  // XPTR write port
  input  logic                  xptr_we,
  input  logic [$clog2(NI)-1:0] xptr_i,
  input  logic [$clog2(NO)-1:0] xptr_k,
  input  logic [F-1:0]          xptr_data,
  output logic                  xptr_ready,
  // control store write port
  input  logic                  pst_we,
  input  logic [$clog2(NI)-1:0] pst_i,
  input  logic [$clog2(NO)-1:0] pst_k,
  input  logic [$clog2(F)-1:0]  pst_addr,
  input  logic [$clog2(F)-1:0]  pst_data,
  output logic                  pst_ready,
  // status
  output logic [NI-1:0]         overrun,
  output logic [NO-1:0]         slip,
  output logic [NO-1:0]         out_dp,
  output logic [NI-1:0]         routing
);

  localparam int unsigned W = $clog2(F);

  // Column-side signals, indexed [i][k].
  logic [NO-1:0] col_pfr_bit  [NI];
  logic [NO-1:0] col_perm_busy[NI];
  logic [NI-1:0] col_pfr_shift;
  logic [NI-1:0] col_dp;
  logic [NI-1:0] col_xptr_ready;

  // Output-side signals, indexed [k][i].
  logic [F-1:0]  far_bus [NO][NI];
  logic [NI-1:0] far_done[NO];
  logic [NI-1:0] far_free[NO];

  logic [NO-1:0] perm_st_ready [NI];

  for (genvar i = 0; i < NI; i++) begin : g_col
    route_column #(.F(F), .NO(NO)) u_route (
      .clk          (clk),
      .rst_n        (rst_n),
      .line_bit     (in_bit[i]),
      .line_bit_en  (in_bit_en[i]),
      .frame_pulse  (in_frame[i]),
      .perm_busy    (col_perm_busy[i]),
      .pfr_bit      (col_pfr_bit[i]),
      .pfr_shift    (col_pfr_shift[i]),
      .data_present (col_dp[i]),
      .xptr_we      (xptr_we && (xptr_i == $clog2(NI)'(i))),
      .xptr_k       (xptr_k),
      .xptr_data    (xptr_data),
      .xptr_ready   (col_xptr_ready[i]),
      .routing      (routing[i]),
      .overrun      (overrun[i])
    );

    for (genvar k = 0; k < NO; k++) begin : g_perm
      permuter #(.F(F), .W(W)) u_perm (
        .clk       (clk),
        .rst_n     (rst_n),
        .pfr_in    (col_pfr_bit[i][k]),
        .pfr_shift (col_pfr_shift[i]),
        .start     (col_dp[i]),
        .far_free  (far_free[k][i]),
        .bus       (far_bus[k][i]),
        .done      (far_done[k][i]),
        .busy      (col_perm_busy[i][k]),
        .st_we     (pst_we && (pst_i == $clog2(NI)'(i)) && (pst_k == $clog2(NO)'(k))),
        .st_addr   (pst_addr),
        .st_data   (pst_data),
        .st_ready  (perm_st_ready[i][k])
      );
    end
  end

  for (genvar k = 0; k < NO; k++) begin : g_out
    far_output #(.F(F), .NI(NI)) u_far (
      .clk          (clk),
      .rst_n        (rst_n),
      .bus          (far_bus[k]),
      .done         (far_done[k]),
      .far_free     (far_free[k]),
      .moe          (moe),
      .out_bit_en   (out_bit_en),
      .out_bit      (out_bit[k]),
      .out_frame    (out_frame[k]),
      .data_present (out_dp[k]),
      .slip         (slip[k])
    );
  end

  assign xptr_ready = col_xptr_ready[xptr_i];
  assign pst_ready  = perm_st_ready[pst_i][pst_k];

endmodule
