// fp64_mul: pipelined IEEE-754 binary64 multiplier (the PE's multiply
// pipeline).
//
// Computes a * b with round-to-nearest-even. As in fp64_add, the product is
// formed in one combinational block followed by LAT register stages, so one
// pair enters per cycle and leaves LAT cycles later with its TAG_W-bit tag.
// Subnormal inputs are read as zero and subnormal results flushed to zero;
// infinities and NaNs propagate. The latency is this design's choice.
//
// Interface: in_valid/a/b/in_tag enter; out_valid/y/out_tag appear LAT
// cycles later. No back-pressure.
module fp64_mul #(
  parameter int unsigned LAT   = 6,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [63:0]      a,
  input  logic [63:0]      b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [63:0]      y,
  output logic [TAG_W-1:0] out_tag
);

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic [63:0] mul64(logic [63:0] x, logic [63:0] z);
    logic         so;
    logic [10:0]  ex, ez;
    logic [105:0] p;
    logic [52:0]  m;
    logic         g, st, up;
    logic [53:0]  r;
    logic signed [13:0] e;
    logic         xz, zz, xi, zi;
    so = x[63] ^ z[63];
    ex = x[62:52]; ez = z[62:52];
    xz = (ex == 0); zz = (ez == 0);
    xi = (ex == 11'h7FF); zi = (ez == 11'h7FF);
    if ((xi && x[51:0] != 0) || (zi && z[51:0] != 0)) return QNAN;
    if ((xi && zz) || (zi && xz)) return QNAN;
    if (xi || zi) return {so, 11'h7FF, 52'd0};
    if (xz || zz) return {so, 63'd0};
    p = {1'b1, x[51:0]} * {1'b1, z[51:0]};
    e = 14'(ex) + 14'(ez) - 14'sd1023;
    if (p[105]) begin
      m  = p[105:53];
      g  = p[52];
      st = |p[51:0];
      e  = e + 14'sd1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      st = |p[50:0];
    end
    up = g & (st | m[0]);
    r  = {1'b0, m} + 54'(up);
    if (r[53]) begin
      r = r >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {so, 11'h7FF, 52'd0};
    if (e <= 14'sd0)    return {so, 63'd0};
    return {so, e[10:0], r[51:0]};
  endfunction

  logic [LAT:0]            v_q;
  logic [LAT:0][63:0]      y_q;
  logic [LAT:0][TAG_W-1:0] t_q;

  assign v_q[0] = in_valid;
  assign y_q[0] = mul64(a, b);
  assign t_q[0] = in_tag;

  for (genvar i = 1; i <= LAT; i++) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q[i] <= 1'b0;
        y_q[i] <= '0;
        t_q[i] <= '0;
      end else begin
        v_q[i] <= v_q[i-1];
        y_q[i] <= y_q[i-1];
        t_q[i] <= t_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LAT];
  assign y         = y_q[LAT];
  assign out_tag   = t_q[LAT];

endmodule
