// rotating_store: the rotating control store of one permuter.
//
// F words of W = ceil(log2 F) bits, organised as in the design as W end-around
// shift registers of F bits each: word j of the store holds P(j), the output
// bit position of input bit j, in binary. `head` is the word at the output
// end. Each `rotate` moves the store one word, so after F rotations it is back
// at its home position, with word 1 at the head again.
//
// The control processor changes the permutation by rewriting words. Writes are
// addressed by word number and are meant for the home position, i.e. while
// the permuter is off line; a write in a cycle that also rotates is ignored
// (the permuter deasserts its ready in that case). Word numbers 0..F-1 stand
// for the document's words 1..F. Reset loads the identity P(j) = j; that, the
// addressed write and the reset are this design's own choices.
//
// Timing: `head` is combinational from the store; rotate and write act at the
// clock edge.
module rotating_store #(
  parameter int unsigned F = ptdm_pkg::FRAME_BITS,
  parameter int unsigned W = $clog2(F)
) (
  input  logic                 clk,
  input  logic                 rst_n,   // active-low synchronous reset
  input  logic                 rotate,  // advance one word (end-around)
  input  logic                 we,      // write word waddr
  input  logic [$clog2(F)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  output logic [W-1:0]         head     // word at the output end
);

  // F words that rotate together: bit b of all words forms one of the W
  // end-around shift registers of the design.
  logic [W-1:0] word_q [F];

  assign head = word_q[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < F; j++) word_q[j] <= W'(j);
    end else if (rotate) begin
      for (int j = 0; j < F - 1; j++) word_q[j] <= word_q[j + 1];
      word_q[F-1] <= word_q[0];
    end else if (we) begin
      word_q[waddr] <= wdata;
    end
  end

endmodule
