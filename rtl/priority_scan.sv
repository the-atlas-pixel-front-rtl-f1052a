// priority_scan: fast priority scan over the hit flags of a column pair.
//
// `any` is the OR of all request flags; `idx` is the highest-numbered request.
// Pixels are numbered 2*row + column-in-pair with row 0 next to the periphery, so
// the highest number is the uppermost hit pixel (right column first within a row;
// that tie-break is this design's choice). Purely combinational. The scan is done
// in two levels: groups of G flags each find their highest request, then the
// highest non-empty group is chosen.
module priority_scan #(
  parameter int N  = 320,
  parameter int IW = (N > 1) ? $clog2(N) : 1,
  parameter int G  = 16
) (
  input  logic [N-1:0]  req,
  output logic          any,
  output logic [IW-1:0] idx
);
  localparam int NG = (N + G - 1) / G;

  logic [NG-1:0] g_any;
  logic [IW-1:0] g_idx [NG];

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      g_any[g] = 1'b0;
      g_idx[g] = '0;
      for (int j = 0; j < G; j++)
        if (g * G + j < N && req[g*G+j]) begin
          g_any[g] = 1'b1;
          g_idx[g] = IW'(g * G + j);
        end
    end
    any = |g_any;
    idx = '0;
    for (int g = 0; g < NG; g++)
      if (g_any[g]) idx = g_idx[g];
  end
endmodule
