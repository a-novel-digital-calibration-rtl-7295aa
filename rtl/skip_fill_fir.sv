// skip_fill_fir: recovers the input samples that were skipped to make room
// for calibration slots, with an 80-tap FIR filter that performs Lagrange
// interpolation.
//
// The word stream x, one sample per clock, runs through a delay line of
// NTAPS+1 words. When the word in the middle of the line is flagged as
// skipped, it is replaced by
//     y(n) = sum_{k=1..N} c_k * (x(n-k) + x(n+k)),  N = NTAPS/2,
// the value at n of the polynomial of degree NTAPS-1 through the NTAPS
// neighbouring samples. For equally spaced points the Lagrange weights are
//     c_k = (-1)^(k+1) * C(2N, N+k) / C(2N, N),
// computed here at elaboration time by the recursion
//     c_1 = N/(N+1),   c_k = -c_(k-1) * (N-k+1)/(N+k),
// and rounded to CFRAC fractional bits (weights below 2^-CFRAC round to 0).
// Other words pass unchanged. The 80-tap filter and Lagrange interpolation
// are the design's; the symmetric placement of the taps around the skipped
// sample, the word widths and the rounding are this implementation's.
// Two skipped samples must be at least N+1 samples apart.
//
// Timing: y, y_skip (the word was filled) and y_valid leave N+1 cycles after
// the word entered. Synchronous active-low reset of the flags.
module skip_fill_fir #(
  parameter int unsigned NTAPS = 80,   // even
  parameter int unsigned XW    = 16,   // sample width, signed
  parameter int unsigned CW    = 24,   // coefficient width, signed
  parameter int unsigned CFRAC = 22    // coefficient fractional bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x,
  input  logic                 x_skip,
  output logic                 y_valid,
  output logic signed [XW-1:0] y,
  output logic                 y_skip
);

  localparam int unsigned N  = NTAPS / 2;
  localparam int unsigned AW = XW + CW + $clog2(NTAPS) + 1;

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t coef_arr_t [1:N];

  // Lagrange weights in Q.56, then rounded to CFRAC bits
  function automatic coef_arr_t lagrange_coefs();
    coef_arr_t   r;
    longint      c;
    c = (longint'(N) <<< 56) / (longint'(N) + 1);
    for (int k = 1; k <= int'(N); k++) begin
      if (k > 1) c = -(c * (longint'(N) - longint'(k) + 1)) / (longint'(N) + longint'(k));
      r[k] = coef_t'((c + (longint'(1) <<< (55 - CFRAC))) >>> (56 - CFRAC));
    end
    return r;
  endfunction

  localparam coef_arr_t COEF = lagrange_coefs();

  logic signed [XW-1:0] line  [0:NTAPS];   // line[0] newest, line[N] centre
  logic                 skipf [0:NTAPS];
  logic                 vld   [0:NTAPS];
  logic signed [AW-1:0] acc, rnd;
  logic signed [XW-1:0] fill;

  always_ff @(posedge clk) begin
    line[0] <= x;
    for (int i = 1; i <= int'(NTAPS); i++) line[i] <= line[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= int'(NTAPS); i++) begin
        skipf[i] <= 1'b0;
        vld[i]   <= 1'b0;
      end
    end else begin
      skipf[0] <= x_valid & x_skip;
      vld[0]   <= x_valid;
      for (int i = 1; i <= int'(NTAPS); i++) begin
        skipf[i] <= skipf[i-1];
        vld[i]   <= vld[i-1];
      end
    end
  end

  always_comb begin
    acc = '0;
    for (int k = 1; k <= int'(N); k++)
      acc += AW'(COEF[k]) * (AW'(line[N-k]) + AW'(line[N+k]));
    rnd = (acc + (AW'(1) <<< (CFRAC - 1))) >>> CFRAC;
    if (rnd > AW'((1 <<< (XW - 1)) - 1))  fill = {1'b0, {(XW-1){1'b1}}};
    else if (rnd < -AW'(1 <<< (XW - 1)))  fill = {1'b1, {(XW-1){1'b0}}};
    else                                  fill = rnd[XW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_skip  <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= vld[N];
      y_skip  <= skipf[N];
      y       <= skipf[N] ? fill : line[N];
    end
  end

endmodule
