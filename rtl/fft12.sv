// fft12: 12-point radix-3/6 split-radix FFT, two pipeline stages.
//
// N = 12 = 2^2 * 3. The DFT splits into one length-N/3 sub-DFT and four
// length-N/6 sub-DFTs:
//   A(k) = DFT4 of x(3n)        = x0, x3, x6, x9       (4-point SRFFT)
//   B(k) = DFT2 of x(6n+7)      = x7, x1   twiddle W12^(7k)
//   C(k) = DFT2 of x(6n+4)      = x4, x10  twiddle W12^(4k)  = W3^k
//   E(k) = DFT2 of x(6n-4)      = x8, x2   twiddle W12^(-4k) = W3^-k
//   F(k) = DFT2 of x(6n-7)      = x5, x11  twiddle W12^(-7k)
//   X(k) = A(k) + W^7k B(k) + W^4k C(k) + W^-4k E(k) + W^-7k F(k)
// B and F, and C and E, carry conjugate twiddles. Because A repeats every 4
// bins and B..F every 2, the three outputs X(k), X(k+4), X(k+8) differ only by
// powers of W3, and for k = 0..3 they are one 3-point FFT of
//   A(k),  P(k) = W^7k B + W^4k C,  Q(k) = W^-4k E + W^-7k F.
// For k = 0 and k = 3 all twiddles are 1, j or -j and cost no multiplier; for
// k = 1 and k = 2 eight general rotations are needed.
// The stage structure and the index sets follow the original 12-point flow
// graph, which draws only the trivial factors (-1, j, -j); the general
// twiddles come from the decomposition. Pipeline depth, widths, rounding,
// the valid signals and the reset are this design's choices.
//
// Stage 1 (registered): the 4-point SRFFT and four 2-point FFTs.
// Stage 2 (registered): twiddle rotations, P/Q sums, four 3-point FFTs, and
// rounding to the OUT_W-bit output integers.
// Timing: inputs are taken on a clock edge with in_valid high; out_valid is
// high for one cycle two edges later, with X holding the result until the
// next one: latency 2 cycles, one transform per cycle. Reset is
// asynchronous, active low, and clears both stages.
module fft12
  import fft36_pkg::*;
#(
  parameter int N = 12   // transform length; this structure is for 12 only
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cin_t  x [N],
  output logic  out_valid,
  output cout_t X [N]
);

  if (N != 12) begin : g_bad_n
    $error("fft12: this datapath is built for N = 12 only");
  end

  // ---- stage 1 ----
  cplx_t xi [12];
  cplx_t a [4];
  cplx_t b [2], c [2], e [2], f [2];

  always_comb
    for (int n = 0; n < 12; n++) xi[n] = from_in(x[n]);

  srfft4 u_a (.x0(xi[0]), .x1(xi[3]), .x2(xi[6]), .x3(xi[9]),
              .y0(a[0]), .y1(a[1]), .y2(a[2]), .y3(a[3]));
  fft2   u_b (.a(xi[7]), .b(xi[1]),  .y0(b[0]), .y1(b[1]));
  fft2   u_c (.a(xi[4]), .b(xi[10]), .y0(c[0]), .y1(c[1]));
  fft2   u_e (.a(xi[8]), .b(xi[2]),  .y0(e[0]), .y1(e[1]));
  fft2   u_f (.a(xi[5]), .b(xi[11]), .y0(f[0]), .y1(f[1]));

  cplx_t r_a [4];
  cplx_t r_b [2], r_c [2], r_e [2], r_f [2];
  logic  v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      for (int i = 0; i < 4; i++) r_a[i] <= '0;
      for (int i = 0; i < 2; i++) begin
        r_b[i] <= '0; r_c[i] <= '0; r_e[i] <= '0; r_f[i] <= '0;
      end
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        r_a <= a;
        r_b <= b; r_c <= c; r_e <= e; r_f <= f;
      end
    end
  end

  // ---- stage 2 ----
  cplx_t y [12];

  for (genvar k = 0; k < 4; k++) begin : g_bin
    localparam int KB = (7 * k) % 12;
    localparam int KC = (4 * k) % 12;
    localparam int KE = (12 - KC) % 12;
    localparam int KF = (12 - KB) % 12;
    cplx_t bw, cw, ew, fw, p, q;

    twiddle_rot #(.K(KB)) u_wb (.a(r_b[k % 2]), .y(bw));
    twiddle_rot #(.K(KC)) u_wc (.a(r_c[k % 2]), .y(cw));
    twiddle_rot #(.K(KE)) u_we (.a(r_e[k % 2]), .y(ew));
    twiddle_rot #(.K(KF)) u_wf (.a(r_f[k % 2]), .y(fw));

    always_comb begin
      p = cadd(bw, cw);
      q = cadd(ew, fw);
    end

    fft3 u_3 (.a0(r_a[k]), .a1(p), .a2(q),
              .y0(y[k]), .y1(y[k + 4]), .y2(y[k + 8]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int n = 0; n < 12; n++) X[n] <= '0;
    end else begin
      out_valid <= v1;
      if (v1)
        for (int n = 0; n < 12; n++) X[n] <= to_out(y[n]);
    end
  end

endmodule
