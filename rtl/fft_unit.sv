// fft_unit: radix-2 decimation-in-time FFT of N = 2**LOG2N real samples,
// the transform part of the pre-processing stage.
//
// It works on frames. In F_LOAD it accepts N consecutive samples (in_ready
// high) and stores sample m at the bit-reversed address of m, with zero
// imaginary part. In F_CALC one butterfly per cycle runs in place over
// LOG2N stages, (N/2)*LOG2N cycles in all. In F_OUT the N bins leave in
// natural order (bin 0 first) on a valid/ready stream, with out_bin giving
// the bin number. Then it loads the next frame.
//
// Butterfly of stage s (span h = 2**s) on entries i0 and i1 = i0 + h, with
// twiddle W = exp(-j*2*pi*t/N), t = (i0 mod h) * N/(2h):
//     T  = W * x[i1]   (Q1.15 twiddle product, truncated)
//     x[i0] = (x[i0] + T) / 2,   x[i1] = (x[i0] - T) / 2   (truncated, saturated)
// The halving in every stage keeps the data in 16 bits, so the outputs are
// X[k] / N, where X is the DFT of the frame.
// The twiddle table, round(32767*cos) and round(32767*sin) of 2*pi*t/N for
// t = 0..N/2-1, is computed at elaboration.
//
// Frame timing with a ready consumer: N load cycles, (N/2)*LOG2N compute
// cycles and N output cycles (64 cycles for N = 16).
//
// An FFT unit in the pre-processing stage follows the design description,
// which names it but gives no length, number format or structure. The
// length, the in-place single-butterfly structure, the scaling and the
// frame handshake are this implementation's own choices.
module fft_unit
  import sp_pkg::*;
#(
  parameter int unsigned LOG2N = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  sample_t          in_data,
  output logic             in_ready,    // frame being loaded
  output logic             out_valid,
  output sample_t          out_re,
  output sample_t          out_im,
  output logic [LOG2N-1:0] out_bin,
  input  logic             out_ready,
  output logic             busy         // computing or delivering a frame
);

  localparam int unsigned N  = 1 << LOG2N;
  localparam int unsigned SW = (LOG2N > 1) ? $clog2(LOG2N) : 1;
  localparam int unsigned BW = (LOG2N > 1) ? LOG2N - 1 : 1;
  localparam int unsigned TW = DATA_W + 2;   // butterfly working width

  typedef logic signed [COEF_W-1:0] tw_tab_t [N/2];
  typedef logic signed [TW-1:0]     wide_t;

  function automatic tw_tab_t make_twiddles(input bit sine);
    tw_tab_t t;
    for (int k = 0; k < int'(N/2); k++) begin
      real a;
      real v;
      a = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      v = sine ? $sin(a) : $cos(a);
      t[k] = COEF_W'($rtoi(v * 32767.0 + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_COS = make_twiddles(1'b0);
  localparam tw_tab_t TW_SIN = make_twiddles(1'b1);

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] v);
    for (int b = 0; b < int'(LOG2N); b++) bitrev[b] = v[LOG2N-1-b];
  endfunction

  function automatic sample_t sat(input wide_t v);
    if (v > wide_t'(32767))       return 16'sh7fff;
    else if (v < wide_t'(-32768)) return 16'sh8000;
    else                          return sample_t'(v);
  endfunction

  typedef enum logic [1:0] {F_LOAD = 2'd0, F_CALC = 2'd1, F_OUT = 2'd2} fstate_e;

  fstate_e          state_q;
  sample_t          re_q [N];
  sample_t          im_q [N];
  logic [LOG2N-1:0] cnt_q;     // load / output position
  logic [SW-1:0]    stage_q;
  logic [BW-1:0]    bf_q;      // butterfly within the stage

  // butterfly addressing
  logic [LOG2N-1:0] half, pos, i0, i1;
  logic [BW-1:0]    tidx;      // twiddle index, < N/2
  sample_t          x0r, x0i, x1r, x1i;
  coef_t            wc, ws;
  prod_t            m_rc, m_is, m_ic, m_rs;
  logic signed [PROD_W:0] pr, pi;
  wide_t            tr, ti, y0r, y0i, y1r, y1i;

  always_comb begin
    half = LOG2N'(1) << stage_q;
    pos  = LOG2N'(bf_q) & (half - 1'b1);
    i0   = ((LOG2N'(bf_q) >> stage_q) << (stage_q + 1'b1)) | pos;
    i1   = i0 | half;
    tidx = BW'(pos << (SW'(LOG2N - 1) - stage_q));
    x0r  = re_q[i0];
    x0i  = im_q[i0];
    x1r  = re_q[i1];
    x1i  = im_q[i1];
    wc   = TW_COS[tidx];
    ws   = TW_SIN[tidx];
    // T = (x1r + j x1i) * (wc - j ws)
    m_rc = x1r * wc;
    m_is = x1i * ws;
    m_ic = x1i * wc;
    m_rs = x1r * ws;
    pr   = (PROD_W+1)'(m_rc) + (PROD_W+1)'(m_is);
    pi   = (PROD_W+1)'(m_ic) - (PROD_W+1)'(m_rs);
    tr   = wide_t'(pr >>> (COEF_W - 1));
    ti   = wide_t'(pi >>> (COEF_W - 1));
    y0r  = (wide_t'(x0r) + tr) >>> 1;
    y0i  = (wide_t'(x0i) + ti) >>> 1;
    y1r  = (wide_t'(x0r) - tr) >>> 1;
    y1i  = (wide_t'(x0i) - ti) >>> 1;
  end

  assign in_ready  = (state_q == F_LOAD);
  assign out_valid = (state_q == F_OUT);
  assign out_re    = re_q[cnt_q];
  assign out_im    = im_q[cnt_q];
  assign out_bin   = cnt_q;
  assign busy      = (state_q != F_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= F_LOAD;
      cnt_q   <= '0;
      stage_q <= '0;
      bf_q    <= '0;
      for (int k = 0; k < int'(N); k++) begin
        re_q[k] <= '0;
        im_q[k] <= '0;
      end
    end else begin
      unique case (state_q)
        F_LOAD: if (in_valid) begin
          re_q[bitrev(cnt_q)] <= in_data;
          im_q[bitrev(cnt_q)] <= '0;
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == LOG2N'(N - 1)) begin
            state_q <= F_CALC;
            stage_q <= '0;
            bf_q    <= '0;
          end
        end
        F_CALC: begin
          re_q[i0] <= sat(y0r);
          im_q[i0] <= sat(y0i);
          re_q[i1] <= sat(y1r);
          im_q[i1] <= sat(y1i);
          bf_q <= bf_q + 1'b1;
          if (bf_q == BW'(N/2 - 1)) begin
            bf_q    <= '0;
            stage_q <= stage_q + 1'b1;
            if (stage_q == SW'(LOG2N - 1)) begin
              state_q <= F_OUT;
              cnt_q   <= '0;
            end
          end
        end
        F_OUT: if (out_ready) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == LOG2N'(N - 1)) state_q <= F_LOAD;
        end
        default: state_q <= F_LOAD;
      endcase
    end
  end

  initial begin
    assert (LOG2N >= 2) else $error("fft_unit: LOG2N must be at least 2");
  end

endmodule
