// Vector dot-product box of the matrix-multiplication RU.
//
// Multiplies a 16-element slice of a row of A with the matching slice of a
// column of B.  Four multiply-accumulate (MAC) units each serve four
// consecutive elements through a 4:1 input multiplexer: MAC k handles
// elements 4k..4k+3, one per cycle, selected by a shared select counter.
// After the four MAC cycles an adder sums the four accumulators into the
// box's output register.
//
// Timing (clock edges counted from the edge that samples start as t=0): the
// MACs accumulate on edges t=1..4, sum is registered on edge t=5 and valid is
// high for the one cycle after it.  row and col must stay stable from start
// until the MAC cycles are over.  Structure and cycle count follow the
// document's figure of the RU; the element width (16-bit signed) and the
// accumulator width (32 bits, wrapping) are this design's choice.
module mm_box #(
  parameter int unsigned N      = 16,   // elements per box
  parameter int unsigned NMAC   = 4,    // MAC units per box
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] row [N],
  input  logic signed [DATA_W-1:0] col [N],
  output logic signed [ACC_W-1:0]  sum,
  output logic                     valid
);
  localparam int unsigned SHARE = N / NMAC;           // elements per MAC
  localparam int unsigned SW    = (SHARE > 1) ? $clog2(SHARE) : 1;

  logic                    run, sum_pend;
  logic [SW-1:0]           sel;
  logic signed [ACC_W-1:0] acc [NMAC];
  logic signed [ACC_W-1:0] acc_sum;

  always_ff @(posedge clk) begin
    if (rst) begin
      run      <= 1'b0;
      sum_pend <= 1'b0;
      sel      <= '0;
      valid    <= 1'b0;
      sum      <= '0;
      for (int k = 0; k < NMAC; k++) acc[k] <= '0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        run <= 1'b1;
        sel <= '0;
        for (int k = 0; k < NMAC; k++) acc[k] <= '0;
      end else if (run) begin
        for (int k = 0; k < NMAC; k++)
          acc[k] <= acc[k] + ACC_W'(row[k*SHARE + int'(sel)]) * ACC_W'(col[k*SHARE + int'(sel)]);
        sel <= sel + 1'b1;
        if (int'(sel) == SHARE - 1) begin
          run      <= 1'b0;
          sum_pend <= 1'b1;
        end
      end
      if (sum_pend) begin
        sum      <= acc_sum;
        valid    <= 1'b1;
        sum_pend <= 1'b0;
      end
    end
  end

  always_comb begin
    acc_sum = '0;
    for (int k = 0; k < NMAC; k++) acc_sum += acc[k];
  end

  initial assert (N % NMAC == 0) else $error("N must be a multiple of NMAC");
endmodule
