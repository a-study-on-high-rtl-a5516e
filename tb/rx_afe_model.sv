// rx_afe_model: behavioural model, for testbenches only, of everything in
// front of the digital back end: PRBS transmitter (PRBS7, PRBS15 or PRBS31,
// x^N + x^M + 1 with N,M = 7,6 / 15,14 / 31,28), lossy channel with CTLE,
// the phase interpolator, the four quarter-rate slices with their CML summers
// (2-tap DFE feedback) and their data and error comparators, and the DACs.
//
// The channel plus CTLE is a single-bit response p(u), u in unit intervals
// after the start of a bit: a Gaussian rise to a peak of PEAK at u = 0.6 and
// an exponential tail (time constant TAIL UI). Slice s of cycle j samples at
// t = 4j + s + pi/32 UI, where pi is the interpolator code decoded from its
// gray MSBs and thermometer LSBs (32 steps per UI, 128 per clock period).
// The sample of bit m = floor(t), at fraction f = t - m, is
//   x = sum_k p(k + f) * a[m-k]  -  w1 * d[m-1]  -  w2 * d[m-2]  +  noise
// with a, d in {-1,+1}, d the model's own earlier decisions, and w1, w2 the
// number of tap-DAC cells switched on. The data comparator of slice s has an
// offset OFS_D[s] that the 5-bit offset DAC cancels at 2 units per code
// around code 16. The error comparator compares x with the number of
// reference-DAC cells on plus its own offset OFS_E[s]. One unit is one
// current-DAC LSB. Noise is the sum of four uniform draws in +/-NOISE/2.
//
// Outputs are updated just after each rising clock edge and hold for the
// digital back end's next edge.
module rx_afe_model #(
  parameter real PEAK  = 180.0,
  parameter real TAIL  = 0.85,
  parameter int  NOISE = 6,
  parameter int  PRBS  = 7
) (
  input  logic                   clk,
  input  logic [1:0]             pi_gray_msb,
  input  logic [31:0]            pi_therm_lsb,
  input  logic [3:0][254:0]      bdlev_cells,
  input  logic [254:0]           w1_cells,
  input  logic [254:0]           w2_cells,
  input  logic [3:0][4:0]        ofs_code,
  output logic [3:0]             d_q,
  output logic [3:0]             e_q
);

  localparam int KPRE = 2, KPOST = 8;
  int OFS_D [4] = '{6, -4, 2, 0};
  int OFS_E [4] = '{3, -2, 0, 1};

  // cursor table: h[f][k + KPRE], f = 0..31 (fraction of a UI in 1/32)
  real h [32][KPRE + KPOST + 1];
  localparam int PTAP = (PRBS == 31) ? 28 : (PRBS == 15) ? 14 : 6;
  logic [30:0] prbs = '1;
  int   gen_n = -1;           // highest generated bit index
  bit   tx   [256];
  bit   dec  [256];
  longint cyc = 0;

  function automatic real pulse(real u);
    if (u < 0.6) return PEAK * $exp(-((u - 0.6) / 0.5) * ((u - 0.6) / 0.5));
    else         return PEAK * $exp(-(u - 0.6) / TAIL);
  endfunction

  function automatic int pi_code();
    int q, ones;
    q = {pi_gray_msb[1], pi_gray_msb[1] ^ pi_gray_msb[0]};
    ones = $countones(pi_therm_lsb);
    return q * 32 + ((q % 2 == 1) ? 32 - ones : ones);
  endfunction

  initial begin
    for (int f = 0; f < 32; f++)
      for (int k = -KPRE; k <= KPOST; k++)
        h[f][k + KPRE] = pulse(real'(k) + real'(f) / 32.0);
    d_q = '0; e_q = '0;
  end

  function automatic int noise();
    int n = 0;
    for (int i = 0; i < 4; i++) n += int'($urandom % (NOISE + 1)) - NOISE / 2;
    return n;
  endfunction

  always @(posedge clk) begin
    int code, t, m, f;
    real x;
    int w1, w2, ref_lvl, ofs;
    code = pi_code();
    w1 = $countones(w1_cells);
    w2 = $countones(w2_cells);
    for (int s = 0; s < 4; s++) begin
      t = int'(cyc) * 128 + s * 32 + code;        // time in 1/32 UI
      m = t / 32;
      f = t % 32;
      while (gen_n < m + KPRE) begin
        gen_n++;
        tx[gen_n % 256] = prbs[PRBS-1] ^ prbs[PTAP-1];
        prbs = {prbs[29:0], prbs[PRBS-1] ^ prbs[PTAP-1]};
      end
      x = 0.0;
      for (int k = -KPRE; k <= KPOST; k++)
        x += h[f][k + KPRE] * (tx[(m - k + 256) % 256] ? 1.0 : -1.0);
      x -= real'(w1) * (dec[(m - 1 + 256) % 256] ? 1.0 : -1.0);
      x -= real'(w2) * (dec[(m - 2 + 256) % 256] ? 1.0 : -1.0);
      x += real'(noise());
      ofs = OFS_D[s] - 2 * (int'(ofs_code[s]) - 16);
      d_q[s] <= (x + real'(ofs)) > 0.0;
      dec[m % 256] = (x + real'(ofs)) > 0.0;
      ref_lvl = $countones(bdlev_cells[s]);
      e_q[s] <= (x + real'(OFS_E[s])) > real'(ref_lvl);
    end
    cyc++;
  end

endmodule
