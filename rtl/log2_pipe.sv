// log2_pipe: fully pipelined fixed-point base-2 logarithm of an unsigned integer.
//
// The entropy stage of the mutual-information accelerators needs log2 of every
// histogram bin, one bin per clock. This unit accepts one value per cycle and
// returns log2(value) FRAC+1 cycles later, with no back-pressure: a valid input
// always appears at the output after the fixed latency.
//
// How it works: the first stage finds the leading one, which gives the integer
// part, and normalises the value to a mantissa m in [1,2). Each of the next FRAC
// stages squares m; if the square reaches 2 the next fractional bit is 1 and the
// square is halved (the classic bit-by-bit logarithm). The mantissa keeps
// FRAC+8 fractional bits so that truncation errors stay below one output LSB.
// log2(0) is reported as 0, which makes 0*log2(0) = 0 in the entropy sums.
//
// Interface: in_valid/in_data/in_tag in, out_valid/out_data/out_tag/out_log out.
// out_data and out_tag are the input value and tag carried alongside.
// out_log is unsigned with FRAC fractional bits. The algorithm is this design's
// choice; the source only says that entropies are computed in hardware.
module log2_pipe #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned FRAC  = 20,
  parameter int unsigned TAG_W = 2,
  localparam int unsigned IW   = $clog2(IN_W),
  localparam int unsigned LW   = IW + FRAC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [IN_W-1:0]    in_data,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [IN_W-1:0]    out_data,
  output logic [TAG_W-1:0]   out_tag,
  output logic [LW-1:0]      out_log
);
  localparam int unsigned MW = FRAC + 8;  // mantissa fractional bits

  logic              v_q   [FRAC+1];
  logic [IN_W-1:0]   d_q   [FRAC+1];
  logic [TAG_W-1:0]  t_q   [FRAC+1];
  logic [IW-1:0]     e_q   [FRAC+1];
  logic [FRAC-1:0]   f_q   [FRAC+1];
  logic [MW:0]       m_q   [FRAC+1];

  // Leading-one position and normalised mantissa of the input.
  logic [IW-1:0] msb;
  logic [MW:0]   mant;
  always_comb begin
    logic [IN_W+MW:0] wide;
    msb = '0;
    for (int i = 0; i < IN_W; i++)
      if (in_data[i]) msb = IW'(i);
    wide = {{(MW+1){1'b0}}, in_data} << MW;
    wide = wide >> msb;
    mant = wide[MW:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= FRAC; s++) v_q[s] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int s = 1; s <= FRAC; s++) v_q[s] <= v_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    d_q[0] <= in_data;
    t_q[0] <= in_tag;
    e_q[0] <= msb;
    f_q[0] <= '0;
    m_q[0] <= mant;
    for (int s = 1; s <= FRAC; s++) begin
      logic [2*MW+1:0] sq;
      sq = (2*MW+2)'(m_q[s-1]) * (2*MW+2)'(m_q[s-1]);
      d_q[s] <= d_q[s-1];
      t_q[s] <= t_q[s-1];
      e_q[s] <= e_q[s-1];
      f_q[s] <= f_q[s-1];
      if (sq[2*MW+1]) begin
        f_q[s][FRAC-s] <= 1'b1;
        m_q[s] <= sq[2*MW+1:MW+1];
      end else begin
        f_q[s][FRAC-s] <= 1'b0;
        m_q[s] <= sq[2*MW:MW];
      end
    end
  end

  assign out_valid = v_q[FRAC];
  assign out_data  = d_q[FRAC];
  assign out_tag   = t_q[FRAC];
  assign out_log   = (d_q[FRAC] == '0) ? '0 : {e_q[FRAC], f_q[FRAC]};

endmodule
