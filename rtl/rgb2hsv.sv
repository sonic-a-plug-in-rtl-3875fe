// rgb2hsv: PIPE Router format converter from RGB to HSV, applied to pixels on their way
// to the PE when the plug-in expects HSV components.
//
// The SONIC paper gives this conversion as the example of the PR's data-format role; the
// arithmetic is this design's. All components are 8 bits: V = max(R,G,B);
// S = 255*(max-min)/max (0 when max = 0); H is the hue angle scaled so that 256 steps make
// a full turn: 0 + 43*(G-B)/d when R is the largest, 85 + 43*(B-R)/d when G is, and
// 171 + 43*(R-G)/d when B is, with d = max-min, the quotient truncated toward zero and the
// sum taken modulo 256 (H = 0 for grey). Alpha passes unchanged. Purely combinational; in
// the PR it sits between the source multiplexer and the PIPEFlow transmitter, which leaves
// it two clocks per pixel.
module rgb2hsv (
  input  logic [31:0] rgba,   // {R,G,B,a}
  output logic [31:0] hsva    // {H,S,V,a}
);

  logic [7:0] r, g, b, mx, mn, d;
  logic [7:0] h, s;
  logic signed [9:0]  diff;
  logic signed [15:0] num, q;
  logic [15:0] snum;

  always_comb begin
    r  = rgba[31:24];
    g  = rgba[23:16];
    b  = rgba[15:8];
    mx = (r >= g) ? ((r >= b) ? r : b) : ((g >= b) ? g : b);
    mn = (r <= g) ? ((r <= b) ? r : b) : ((g <= b) ? g : b);
    d  = mx - mn;

    snum = 16'(d) * 16'd255;
    s    = (mx == 0) ? 8'd0 : 8'(snum / 16'(mx));

    if (mx == r)      diff = 10'(signed'({2'b00, g})) - 10'(signed'({2'b00, b}));
    else if (mx == g) diff = 10'(signed'({2'b00, b})) - 10'(signed'({2'b00, r}));
    else              diff = 10'(signed'({2'b00, r})) - 10'(signed'({2'b00, g}));
    num = 16'(diff) * 16'sd43;
    q   = (d == 0) ? 16'sd0 : num / signed'({8'd0, d});

    if (d == 0)       h = 8'd0;
    else if (mx == r) h = 8'(q);
    else if (mx == g) h = 8'd85 + 8'(q);
    else              h = 8'd171 + 8'(q);

    hsva = {h, s, mx, rgba[7:0]};
  end

endmodule
