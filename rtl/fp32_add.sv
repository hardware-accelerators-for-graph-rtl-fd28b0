// fp32_add: combinational IEEE-754 single-precision adder for the accumulator.
//
// Rounds to nearest, ties to even. Subnormal inputs are read as zero and results
// below the normal range are flushed to zero; overflow gives infinity; a NaN
// input or inf + (-inf) gives the quiet NaN 0x7fc00000. The larger operand's
// significand is kept with 26 extra low bits and the smaller one is aligned to it
// with a sticky bit, which is enough for a correctly rounded sum. The FP32 data
// type follows the accelerator configuration; the flush-to-zero handling of
// subnormals is this design's simplification.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] sum
);

  localparam int W = 50;  // 24-bit significand + 26 extra bits

  always_comb begin
    logic        sa, sb, sl, ss;
    logic [7:0]  ea, eb, el, es;
    logic [22:0] fa, fb;
    logic        za, zb, nan_a, nan_b, inf_a, inf_b;
    logic [W-1:0] ml, ms, shifted;
    logic        sticky;
    logic [W:0]  acc;
    logic [8:0]  d;
    int          lz;
    logic [9:0]  e;                 // signed working exponent
    logic [23:0] mant;
    logic        guard, rest;
    logic [24:0] rounded;

    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    za = (ea == 8'd0); zb = (eb == 8'd0);
    nan_a = (ea == 8'hff) && (fa != '0);
    nan_b = (eb == 8'hff) && (fb != '0);
    inf_a = (ea == 8'hff) && (fa == '0);
    inf_b = (eb == 8'hff) && (fb == '0);

    sum = '0;
    ml = '0; ms = '0; shifted = '0; sticky = 1'b0; acc = '0; d = '0; lz = 0;
    e = '0; mant = '0; guard = 1'b0; rest = 1'b0; rounded = '0;
    sl = 1'b0; ss = 1'b0; el = '0; es = '0;

    if (nan_a || nan_b || (inf_a && inf_b && (sa != sb))) begin
      sum = 32'h7fc0_0000;
    end else if (inf_a) begin
      sum = {sa, 8'hff, 23'd0};
    end else if (inf_b) begin
      sum = {sb, 8'hff, 23'd0};
    end else if (za && zb) begin
      sum = {sa & sb, 31'd0};
    end else if (za) begin
      sum = b;
    end else if (zb) begin
      sum = a;
    end else begin
      // order by magnitude
      if (a[30:0] >= b[30:0]) begin
        sl = sa; el = ea; ml = {1'b1, fa, 26'd0};
        ss = sb; es = eb; ms = {1'b1, fb, 26'd0};
      end else begin
        sl = sb; el = eb; ml = {1'b1, fb, 26'd0};
        ss = sa; es = ea; ms = {1'b1, fa, 26'd0};
      end
      d = {1'b0, el} - {1'b0, es};
      if (d >= 9'(W)) begin
        shifted = '0;
        sticky  = 1'b1;
      end else begin
        shifted = ms >> d;
        sticky  = ((shifted << d) != ms);
      end
      shifted[0] = shifted[0] | sticky;
      if (sl == ss) acc = {1'b0, ml} + {1'b0, shifted};
      else          acc = {1'b0, ml} - {1'b0, shifted};

      e = {2'b00, el};
      if (acc == '0) begin
        sum = 32'd0;
      end else begin
        if (acc[W]) begin
          // carry out: shift right by one, keep the sticky
          acc = {1'b0, acc[W:2], acc[1] | acc[0]};
          e   = e + 10'd1;
        end else begin
          lz = 0;
          for (int i = W - 1; i >= 0; i--) begin
            if (acc[i]) break;
            lz++;
          end
          acc = acc << lz;
          e   = e - 10'(lz);
        end
        // acc[W-1] is now the hidden bit
        mant  = acc[W-1:W-24];
        guard = acc[W-25];
        rest  = |acc[W-26:0];
        rounded = {1'b0, mant} + 25'(guard && (rest || mant[0]));
        if (rounded[24]) begin
          rounded = rounded >> 1;
          e = e + 10'd1;
        end
        if ($signed(e) <= 0)       sum = {sl, 31'd0};
        else if (e >= 10'd255)     sum = {sl, 8'hff, 23'd0};
        else                       sum = {sl, e[7:0], rounded[22:0]};
      end
    end
  end

endmodule
