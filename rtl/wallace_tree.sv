// wallace_tree: carry-save reduction of ROWS addends to a sum and a carry row.
//
// Layer by layer, the rows are taken in groups of three and each group goes
// through a row of full adders (3:2 compressors): the XOR of the three bits is
// the sum row, the majority shifted up by one bit is the carry row. One or two
// rows left over in a layer pass to the next unchanged. The layers continue
// until two rows are left, so ROWS rows need about log_{3/2}(ROWS/2) full-adder
// delays. All arithmetic is modulo 2^W: sum + carry = rows[0] + ... + rows[ROWS-1]
// (mod 2^W). Purely combinational; the caller adds sum and carry with a CLA.
module wallace_tree
  import rfir_pkg::*;
#(
  parameter int unsigned ROWS = 5,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  localparam int unsigned LEVELS = wallace_levels(ROWS);

  // The layers are unrolled from one loop; n is the number of live rows
  // entering each layer and is a constant at every step of the unrolled loop.
  always_comb begin
    logic [W-1:0] cur [ROWS];
    logic [W-1:0] nxt [ROWS];
    int unsigned  n, ngrp;
    cur = rows;
    n   = ROWS;
    for (int unsigned lv = 0; lv < LEVELS; lv++) begin
      ngrp = n / 3;
      for (int unsigned r = 0; r < ROWS; r++) nxt[r] = '0;
      for (int unsigned k = 0; k < ROWS / 3; k++) begin
        if (k < ngrp) begin
          nxt[2*k]   = cur[3*k] ^ cur[3*k+1] ^ cur[3*k+2];
          nxt[2*k+1] = ((cur[3*k] & cur[3*k+1]) | (cur[3*k] & cur[3*k+2]) |
                        (cur[3*k+1] & cur[3*k+2])) << 1;
        end
      end
      // one or two rows left over pass to the next layer unchanged
      for (int unsigned r = 0; r < 2; r++)
        if (3 * ngrp + r < n) nxt[2*ngrp + r] = cur[3*ngrp + r];
      cur = nxt;
      n   = wallace_next(n);
    end
    sum   = cur[0];
    carry = (ROWS >= 2) ? cur[1] : '0;
  end

endmodule
