// booth_mult: three-stage pipelined radix-4 modified Booth multiplier.
//
// Signed WX-bit multiplicand x times signed WY-bit multiplier y, full
// WX+WY-bit signed product p. The multiplier is cut into three pipeline
// stages along its functions:
//   stage 1  Booth encoder (recodes y into ceil(WY/2) digits in {-2..+2}) and
//            Booth decoder (one partial product row per digit plus a row of
//            the +1 bits of negated rows), registered;
//   stage 2  Wallace tree of 3:2 compressors down to a sum and a carry row,
//            registered;
//   stage 3  carry-lookahead adder of sum and carry, registered.
// Latency is 3 clocks, one new operand pair is accepted every clock. The
// register after every stage and the asynchronous active-low reset that
// clears them are this design's choice. In the filter, x is the input sample
// and y, the Booth-recoded operand, is the coefficient.
module booth_mult
  import rfir_pkg::*;
#(
  parameter int unsigned WX = 8,
  parameter int unsigned WY = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [WX-1:0]       x,
  input  logic [WY-1:0]       y,
  output logic [WX+WY-1:0]    p
);

  localparam int unsigned ND = booth_digits(WY);
  localparam int unsigned PW = WX + WY;
  localparam int unsigned NR = ND + 1;

  // Stage 1: Booth encoding and partial products
  booth_dig_t    dig    [ND];
  logic [PW-1:0] pp     [NR];
  logic [PW-1:0] pp_q   [NR];

  booth_encoder #(.WY(WY)) u_enc (.y(y), .dig(dig));
  booth_decoder #(.WX(WX), .WY(WY)) u_dec (.x(x), .dig(dig), .pp(pp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < NR; r++) pp_q[r] <= '0;
    end else begin
      pp_q <= pp;
    end
  end

  // Stage 2: Wallace tree
  logic [PW-1:0] ws, wc, ws_q, wc_q;

  wallace_tree #(.ROWS(NR), .W(PW)) u_wal (.rows(pp_q), .sum(ws), .carry(wc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws_q <= '0;
      wc_q <= '0;
    end else begin
      ws_q <= ws;
      wc_q <= wc;
    end
  end

  // Stage 3: carry-lookahead final addition
  logic [PW-1:0] sum;
  logic          unused_cout;

  cla #(.W(PW)) u_cla (.a(ws_q), .b(wc_q), .cin(1'b0), .s(sum), .cout(unused_cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= sum;
  end

endmodule
