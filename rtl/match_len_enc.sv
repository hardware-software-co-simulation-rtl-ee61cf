// Match-length encoder of the LZ77 RU.
//
// Turns the outputs of the Q-1 byte comparators into the length of the
// matching string: the number of consecutive matches counted from comparator
// 0 (the first lookahead byte) up to the first mismatch.  length_valid marks
// the cycles in which the comparators look at a search-window position
// (en high); it advances the index register and shifts the encoding buffer.
// Purely combinational.  The encoder's role and its two outputs follow the
// document's figure; the leading-ones count is this design's reading of
// "encodes the comparator outputs into a binary value indicating the string
// match length".
module match_len_enc #(
  parameter int unsigned Q = 16,
  localparam int unsigned LW = $clog2(Q)
) (
  input  logic [Q-2:0]  eq,
  input  logic          en,
  output logic [LW-1:0] match_length,
  output logic          length_valid
);
  always_comb begin
    logic run;
    run          = 1'b1;
    match_length = '0;
    for (int j = 0; j < Q - 1; j++) begin
      run = run & eq[j];
      if (run) match_length = LW'(j + 1);
    end
  end

  assign length_valid = en;
endmodule
