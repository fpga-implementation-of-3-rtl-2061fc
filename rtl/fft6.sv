// fft6: 6-point radix-3/6 FFT, two pipeline stages.
//
// With N = 6 the radix-3/6 decomposition leaves a length-N/3 = 2 sub-DFT A(k)
// of x(0), x(3) and four length-1 sub-DFTs x(5), x(2), x(4), x(1) with
// twiddles W6^(5k), W3^k, W3^-k, W6^-5k. Grouping outputs as X(k + 2q) gives a
// 3-point FFT over q for each k in {0, 1}:
//   k = 0: FFT3( x0 + x3, x1 + x4,           x2 + x5           ) -> X0, X2, X4
//   k = 1: FFT3( x0 - x3, W6^1 (x1 - x4),    W6^2 (x2 - x5)    ) -> X1, X3, X5
// so the first stage is three 2-point FFTs, (x0,x3), (x1,x4), (x2,x5), and the
// second stage two twiddle rotations and two 3-point FFTs, as in the 6-point
// flow graph. The twiddle rotations are not drawn in that graph; they follow
// from the decomposition.
//
// Timing: inputs are taken on a clock edge with in_valid high; the first-stage
// results are registered there; the result is registered one edge later, with
// out_valid high for one cycle: latency 2 cycles, one transform per cycle.
// Both registers hold their contents until new data arrive. Reset is
// asynchronous, active low, and clears both stages.
module fft6
  import fft36_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cin_t  x [6],
  output logic  out_valid,
  output cout_t X [6]
);

  // ---- stage 1: three 2-point FFTs ----
  cplx_t xi [6];
  cplx_t a0, a1, p0, p1, q0, q1;

  always_comb
    for (int n = 0; n < 6; n++) xi[n] = from_in(x[n]);

  fft2 u_a (.a(xi[0]), .b(xi[3]), .y0(a0), .y1(a1));
  fft2 u_p (.a(xi[1]), .b(xi[4]), .y0(p0), .y1(p1));
  fft2 u_q (.a(xi[2]), .b(xi[5]), .y0(q0), .y1(q1));

  cplx_t r_a0, r_a1, r_p0, r_p1, r_q0, r_q1;
  logic  v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      {r_a0, r_a1, r_p0, r_p1, r_q0, r_q1} <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        r_a0 <= a0; r_a1 <= a1;
        r_p0 <= p0; r_p1 <= p1;
        r_q0 <= q0; r_q1 <= q1;
      end
    end
  end

  // ---- stage 2: twiddles W6^1 = W12^2, W6^2 = W12^4 and two 3-point FFTs ----
  cplx_t p1w, q1w;
  cplx_t y [6];

  twiddle_rot #(.K(2)) u_w1 (.a(r_p1), .y(p1w));
  twiddle_rot #(.K(4)) u_w2 (.a(r_q1), .y(q1w));

  fft3 u_even (.a0(r_a0), .a1(r_p0), .a2(r_q0), .y0(y[0]), .y1(y[2]), .y2(y[4]));
  fft3 u_odd  (.a0(r_a1), .a1(p1w),  .a2(q1w),  .y0(y[1]), .y1(y[3]), .y2(y[5]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int n = 0; n < 6; n++) X[n] <= '0;
    end else begin
      out_valid <= v1;
      if (v1)
        for (int n = 0; n < 6; n++) X[n] <= to_out(y[n]);
    end
  end

endmodule
