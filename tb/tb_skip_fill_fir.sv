// tb_skip_fill_fir: a quantised sine runs through the 80-tap filler with one
// sample in every 50 flagged as skipped (its word replaced by garbage).
// Words not skipped must come out unchanged 41 cycles later; a skipped word
// must come out as the Lagrange interpolation of its 80 neighbours,
// recomputed here in floating point from the product form
//     c_k = prod_{j != k} (0 - x_j) / (x_k - x_j),  x_j in {+-1..+-40},
// to within 2 LSB, and within 4 LSB of the sine itself.
module tb_skip_fill_fir;

  localparam int NT = 80, H = NT / 2, XW = 16, N = 1500;
  localparam real AMP = 12000.0, FRQ = 0.0123;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0, x_skip = 1'b0, y_valid, y_skip;
  logic signed [XW-1:0] x, y;

  skip_fill_fir #(.NTAPS(NT), .XW(XW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int  xs [N];
  real xt [N];
  bit  sk [N];
  real c  [1:H];

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real a);
    return a < 0.0 ? -a : a;
  endfunction

  initial begin
    int n_fill = 0;
    // Lagrange weights from the product form
    for (int k = 1; k <= H; k++) begin
      real p;
      p = 1.0;
      for (int j = -H; j <= H; j++)
        if (j != 0 && j != k) p = p * (0.0 - real'(j)) / (real'(k) - real'(j));
      c[k] = p;
    end
    for (int n = 0; n < N; n++) begin
      xt[n] = AMP * $sin(2.0 * 3.14159265358979 * FRQ * real'(n));
      xs[n] = $rtoi(xt[n] + (xt[n] >= 0.0 ? 0.5 : -0.5));
      sk[n] = (n % 50 == 45);
    end
    x = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N + H + 2; n++) begin
      @(negedge clk);
      x_valid = (n < N);
      x_skip  = (n < N) && sk[n];
      x       = (n < N) ? (sk[n] ? XW'(16'sh5a5a) : XW'(xs[n])) : '0;
      @(posedge clk); #1;
      if (n >= H + 1 && n - H - 1 < N) begin
        int s;
        s = n - H - 1;
        checks++;
        if (!y_valid || y_skip != sk[s]) begin
          failures++;
          $display("sample %0d: flags %0b %0b", s, y_valid, y_skip);
        end
        if (!sk[s]) begin
          if (int'(y) != xs[s]) begin
            failures++;
            $display("sample %0d: %0d expected %0d", s, y, xs[s]);
          end
        end else if (s >= H && s < N - H) begin
          real ref_y;
          ref_y = 0.0;
          for (int k = 1; k <= H; k++) ref_y += c[k] * real'(xs[s-k] + xs[s+k]);
          n_fill++;
          checks++;
          if (rabs(real'(y) - ref_y) > 2.0 || rabs(real'(y) - xt[s]) > 4.0) begin
            failures++;
            $display("sample %0d: filled %0d, interpolation %f, sine %f", s, y, ref_y, xt[s]);
          end
        end
      end
    end
    checks++;
    if (n_fill < 20) failures++;
    $display("filled %0d samples", n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
