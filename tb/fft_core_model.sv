// fft_core_model: behavioural model of an N-point FFT core with burst I/O.
// Not synthesizable: it stands for the vendor FFT core. After a start pulse
// it raises rfd for N cycles and takes xn_re/xn_im each of those cycles;
// it then computes the unscaled forward transform directly as a DFT,
// rounds each result to OUT_W bits, waits LAT cycles and presents the bins
// in natural order, one per cycle with dv and xk_index.
module fft_core_model #(
  parameter int unsigned N     = 1024,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 27,
  parameter int unsigned LAT   = 100
) (
  input  logic                    clk,
  input  logic                    start,
  input  logic signed [IN_W-1:0]  xn_re,
  input  logic signed [IN_W-1:0]  xn_im,
  output logic                    rfd,
  output logic                    dv,
  output logic [$clog2(N)-1:0]    xk_index,
  output logic signed [OUT_W-1:0] xk_re,
  output logic signed [OUT_W-1:0] xk_im
);
  localparam real PI = 3.14159265358979323846;
  real xr [N], xi [N], cs [N], sn [N];
  longint ore [N], oim [N];
  int  runs = 0;

  initial begin
    rfd = 0; dv = 0; xk_index = 0; xk_re = 0; xk_im = 0;
    for (int i = 0; i < int'(N); i++) begin
      cs[i] = $cos(2.0 * PI * i / N);
      sn[i] = $sin(2.0 * PI * i / N);
    end
    forever begin
      @(posedge clk);
      if (start) begin
        rfd <= 1;
        for (int i = 0; i < int'(N); i++) begin
          @(posedge clk);
          xr[i] = real'(xn_re);
          xi[i] = real'(xn_im);
        end
        rfd <= 0;
        for (int k = 0; k < int'(N); k++) begin
          real sr, si;
          sr = 0.0; si = 0.0;
          for (int n = 0; n < int'(N); n++) begin
            int m;
            m = (k * n) % int'(N);
            sr += xr[n] * cs[m] + xi[n] * sn[m];
            si += xi[n] * cs[m] - xr[n] * sn[m];
          end
          ore[k] = $rtoi(sr >= 0.0 ? sr + 0.5 : sr - 0.5);
          oim[k] = $rtoi(si >= 0.0 ? si + 0.5 : si - 0.5);
        end
        repeat (LAT) @(posedge clk);
        for (int k = 0; k < int'(N); k++) begin
          dv       <= 1;
          xk_index <= k[$clog2(N)-1:0];
          xk_re    <= OUT_W'(ore[k]);
          xk_im    <= OUT_W'(oim[k]);
          @(posedge clk);
        end
        dv <= 0;
        runs++;
      end
    end
  end
endmodule
