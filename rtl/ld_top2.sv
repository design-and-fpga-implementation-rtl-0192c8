// ld_top2 -- comparator that finds the two extreme values of a vector.
//
// With FIND_MIN = 0 it returns the largest and the second largest of N
// signed values (COMP1 of the defuzzifier); with FIND_MIN = 1 the smallest
// and the second smallest (COMP2). It also returns the index of the first
// value; on a tie the lowest index wins, as a priority encoder would pick.
// If the extreme value occurs twice, the second value equals the first.
//
// Purely combinational: a linear scan that keeps the best two so far.
module ld_top2 #(
  parameter int unsigned N        = 25,
  parameter int unsigned W        = 18,
  parameter bit          FIND_MIN = 1'b0
) (
  input  logic signed [W-1:0]     v_i [N],
  output logic signed [W-1:0]     first_o,
  output logic signed [W-1:0]     second_o,
  output logic [$clog2(N)-1:0]    idx_o
);

  // true when a is strictly better than b
  function automatic logic better(logic signed [W-1:0] a, logic signed [W-1:0] b);
    return FIND_MIN ? (a < b) : (a > b);
  endfunction

  logic signed [W-1:0]  best, next;
  logic [$clog2(N)-1:0] bidx;
  logic                 have_next;

  always_comb begin
    best      = v_i[0];
    bidx      = '0;
    next      = v_i[0];
    have_next = 1'b0;
    for (int unsigned k = 1; k < N; k++) begin
      if (better(v_i[k], best)) begin
        next      = best;
        have_next = 1'b1;
        best      = v_i[k];
        bidx      = k[$clog2(N)-1:0];
      end else if (!have_next || better(v_i[k], next) || v_i[k] == next) begin
        next      = v_i[k];
        have_next = 1'b1;
      end
    end
    first_o  = best;
    second_o = next;
    idx_o    = bidx;
  end

endmodule
