// cla: W-bit carry-lookahead adder with carry-in and carry-out.
//
// Every bit forms propagate P_i = A_i xor B_i and generate G_i = A_i and B_i,
// and the sum is S_i = P_i xor C_i, as in the adder the filter is built on.
// Instead of letting C_{i+1} = G_i + P_i C_i ripple through the word, the
// carries are computed ahead: inside each 4-bit group every carry is a
// two-level AND-OR of the group's P/G bits and the group carry-in, and each
// group also exports a group propagate and generate. A second lookahead level
// forms all group carry-ins from those group signals and the adder's cin.
// The group size of 4 and the two-level scheme are this design's choice.
//
// Purely combinational. The filter uses it for the final addition of every
// Booth multiplier, the adder trees of the inner-product cells and the adders
// of the pipelined adder unit.
module cla #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned GS = 4;               // bits per lookahead group
  localparam int unsigned NG = (W + GS - 1) / GS;
  localparam int unsigned WP = NG * GS;         // padded width

  logic [WP-1:0] p, g;   // bit propagate / generate (padded bits are 0)
  logic [WP:0]   c;      // carry into every bit, c[WP] = carry out
  logic [NG-1:0] gp, gg; // group propagate / generate
  logic [NG:0]   gc;     // carry into every group

  always_comb begin
    p = '0;
    g = '0;
    p[W-1:0] = a ^ b;
    g[W-1:0] = a & b;
  end

  // Group propagate and generate.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      logic pr, gn;
      pr = 1'b1;
      gn = 1'b0;
      for (int unsigned j = 0; j < GS; j++) begin
        gn = g[k*GS+j] | (p[k*GS+j] & gn);
        pr = pr & p[k*GS+j];
      end
      gp[k] = pr;
      gg[k] = gn;
    end
  end

  // Second level: every group carry-in as a sum of products of the group
  // signals below it and cin.
  always_comb begin
    for (int unsigned k = 0; k <= NG; k++) begin
      logic term, acc;
      acc = 1'b0;
      for (int unsigned t = 0; t <= k; t++) begin
        // product of gp[t..k-1] times (t == 0 ? cin : gg[t-1])
        term = (t == 0) ? cin : gg[t-1];
        for (int unsigned u = t; u < k; u++) term = term & gp[u];
        acc = acc | term;
      end
      gc[k] = acc;
    end
  end

  // First level: carries inside each group from the group carry-in.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      for (int unsigned j = 0; j < GS; j++) begin
        logic term, acc;
        acc = 1'b0;
        for (int unsigned t = 0; t <= j; t++) begin
          term = (t == 0) ? gc[k] : g[k*GS+t-1];
          for (int unsigned u = t; u < j; u++) term = term & p[k*GS+u];
          acc = acc | term;
        end
        c[k*GS+j] = acc;
      end
    end
    c[WP] = gc[NG];
  end

  assign s    = p[W-1:0] ^ c[W-1:0];
  assign cout = c[W];

endmodule
