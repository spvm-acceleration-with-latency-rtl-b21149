// fp64_add: pipelined IEEE-754 binary64 adder.
//
// Computes a + b with round-to-nearest-even. The result is computed in one
// combinational block and then carried through LAT register stages, so a
// new pair can enter every cycle and its sum leaves LAT cycles later; a
// synthesis tool with retiming spreads the logic over the stages. A TAG_W-bit
// tag travels with each operation so that callers can match results.
// Subnormal inputs are read as zero and subnormal results are flushed to
// zero; infinities and NaNs propagate (NaN results are the quiet NaN
// 0x7FF8000000000000). The latency is this design's choice.
//
// Interface: in_valid/a/b/in_tag enter; out_valid/y/out_tag appear LAT
// cycles later. No back-pressure: the adder never stalls.
module fp64_add #(
  parameter int unsigned LAT   = 8,
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

  function automatic logic [63:0] add64(logic [63:0] x, logic [63:0] z);
    logic        sx, sz, sl, ss, so;
    logic [10:0] ex, ez;
    logic [52:0] mx, mz;
    logic [10:0] el, es;
    logic [52:0] ml, ms;
    logic [11:0] d;
    logic [55:0] al, as_;
    logic [111:0] wide;
    logic        stk;
    logic [56:0] s;
    logic [5:0]  lz;
    logic signed [13:0] e;
    logic [53:0] r;
    logic        g, rb, st, up;
    logic [55:0] n;
    sx = x[63]; ex = x[62:52]; mx = {1'b1, x[51:0]};
    sz = z[63]; ez = z[62:52]; mz = {1'b1, z[51:0]};
    // special operands
    if ((ex == 11'h7FF && x[51:0] != 0) || (ez == 11'h7FF && z[51:0] != 0))
      return QNAN;
    if (ex == 11'h7FF && ez == 11'h7FF)
      return (sx == sz) ? x : QNAN;
    if (ex == 11'h7FF) return x;
    if (ez == 11'h7FF) return z;
    if (ex == 0 && ez == 0) return {sx & sz, 63'd0};
    if (ex == 0) return z;
    if (ez == 0) return x;
    // order by magnitude
    if ({ex, x[51:0]} >= {ez, z[51:0]}) begin
      sl = sx; el = ex; ml = mx; ss = sz; es = ez; ms = mz;
    end else begin
      sl = sz; el = ez; ml = mz; ss = sx; es = ex; ms = mx;
    end
    d    = {1'b0, el} - {1'b0, es};
    if (d > 12'd60) d = 12'd60;
    al   = {ml, 3'b000};
    wide = {ms, 59'd0} >> d;
    stk  = |wide[55:0];
    as_  = {wide[111:57], wide[56] | stk};
    e    = 14'(el);
    so   = sl;
    if (sl == ss) begin
      s = {1'b0, al} + {1'b0, as_};
      if (s[56]) begin
        n = {s[56:2], s[1] | s[0]};
        e = e + 14'sd1;
      end else begin
        n = s[55:0];
      end
    end else begin
      s = {1'b0, al} - {1'b0, as_};
      if (s[55:0] == 0) return 64'd0;
      // leading-zero count: the highest set bit wins
      lz = 6'd0;
      for (int i = 0; i < 56; i++) begin
        if (s[i]) lz = 6'(55 - i);
      end
      n = s[55:0] << lz;
      e = e - 14'(lz);
    end
    // round to nearest even on [55:3], guard [2], round [1], sticky [0]
    g  = n[2]; rb = n[1]; st = n[0];
    up = g & (rb | st | n[3]);
    r  = {1'b0, n[55:3]} + 54'(up);
    if (r[53]) begin
      r = r >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {so, 11'h7FF, 52'd0};
    if (e <= 14'sd0)    return {so, 63'd0};
    return {so, e[10:0], r[51:0]};
  endfunction

  logic [63:0]      y_c;
  logic [LAT:0]            v_q;
  logic [LAT:0][63:0]      y_q;
  logic [LAT:0][TAG_W-1:0] t_q;

  always_comb y_c = add64(a, b);

  assign v_q[0] = in_valid;
  assign y_q[0] = y_c;
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
