// gmet_engine: gradient maximum-eye-tracking (GMET) update of one control
// code (the phase-interpolator code of the CDR, or one DFE tap weight).
//
// The loop climbs the biased data level (Bdlev), used as a stand-in for the
// vertical eye height. At each update event it compares the present Bdlev
// metric with the value it saw at the previous event:
//   delta = metric_now - metric_at_last_update
//   step  = sign(delta * previous_step)      (turn back only if Bdlev fell)
//   code  = code + step                      (one LSB)
//   wait  = gain * 2^GSHIFT / |delta|        (update delay, in words)
// A large change of Bdlev (a steep gradient, far from the optimum) shortens
// the wait before the next update; a small one (near the optimum) lengthens
// it, so the code moves fast when far away and dithers slowly once
// converged. The update size is always one LSB; the gradient magnitude acts
// through the delay only.
//
// The delay is clamped to [T_MIN, T_MAX] words. When delta is zero the sign
// of the product is zero, which would freeze the code for good on a flat
// stretch of the metric; this design then keeps the previous direction and
// waits T_MAX, so a plateau is crossed and the code turns back only when the
// metric actually drops.
// WRAP=1 lets the code wrap around its range (the interpolator phase is
// circular); WRAP=0 saturates at 0 and at the top code.
//
// While adapt_en is low the code follows man_code, the reference metric
// tracks the input and the timer is held at T_MIN, so adaptation starts from
// a known code, T_MIN words after it is enabled. Time advances on en (one deserialized word).
// update pulses for one cycle when the code is stepped; reversal is high with
// it when the direction was flipped.
//
// From the receiver description: one-LSB updates whose sign is the product
// of the previous step's sign and the sign of the Bdlev change, and an update
// delay equal to a gain divided by |delta Bdlev|. The zero-delta rule, the
// clamp values, the gain scaling and the manual-code behaviour are this
// design's choices.
//
// The assertions at the end state the one-LSB step, the hold between steps and the range of the wait; they are
// switched off while rst_n is low, which is why lint reports rst_n as used
// both asynchronously (the flip-flops) and synchronously (the checks). The
// flip-flops themselves use rst_n only as an asynchronous reset.
module gmet_engine #(
  parameter int unsigned CODE_BITS = 8,
  parameter int unsigned MET_BITS  = 10,
  parameter bit          WRAP      = 1'b0,
  parameter int unsigned GSHIFT    = 4,
  parameter int unsigned T_MIN     = 8,
  parameter int unsigned T_MAX     = 4095
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,          // one deserialized word
  input  logic                 adapt_en,
  input  logic [CODE_BITS-1:0] man_code,
  input  logic [MET_BITS-1:0]  metric,      // Bdlev metric
  input  logic [7:0]           gain,        // update gain alpha_C
  output logic [CODE_BITS-1:0] code,
  output logic                 update,
  output logic                 reversal,
  output logic [$clog2(T_MAX+1)-1:0] delay  // delay chosen at the last update
);

  localparam int unsigned TW = $clog2(T_MAX + 1);
  localparam int unsigned NW = 8 + GSHIFT;

  logic [MET_BITS-1:0] met_ref;
  logic [TW-1:0]       timer;
  logic                dir_up;

  logic signed [MET_BITS:0] delta;
  logic [MET_BITS-1:0]      mag;
  logic [NW-1:0]            num;
  logic [NW-1:0]            quo;
  logic [TW-1:0]            t_next;
  logic                     go_up;
  logic [CODE_BITS-1:0]     code_next;

  always_comb begin
    delta = $signed({1'b0, metric}) - $signed({1'b0, met_ref});
    mag   = delta[MET_BITS] ? MET_BITS'(-delta) : delta[MET_BITS-1:0];
    num   = NW'(gain) << GSHIFT;
    quo   = (mag == '0) ? '1 : NW'(num / NW'(mag));
    if (mag == '0 || quo >= NW'(T_MAX)) t_next = TW'(T_MAX);
    else if (quo <= NW'(T_MIN))         t_next = TW'(T_MIN);
    else                                t_next = quo[TW-1:0];
    // reverse the direction when Bdlev fell after the previous step
    go_up = (delta < 0) ? !dir_up : dir_up;
    if (go_up) begin
      if (code == '1) code_next = WRAP ? '0 : code;
      else            code_next = code + 1'b1;
    end else begin
      if (code == '0) code_next = WRAP ? '1 : code;
      else            code_next = code - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code     <= '0;
      met_ref  <= '0;
      timer    <= TW'(T_MIN);
      dir_up   <= 1'b1;
      delay    <= TW'(T_MAX);
      update   <= 1'b0;
      reversal <= 1'b0;
    end else begin
      update   <= 1'b0;
      reversal <= 1'b0;
      if (!adapt_en) begin
        code    <= man_code;
        met_ref <= metric;
        timer   <= TW'(T_MIN);
        dir_up  <= 1'b1;
      end else if (en) begin
        if (timer == '0) begin
          code     <= code_next;
          dir_up   <= go_up;
          met_ref  <= metric;
          timer    <= t_next - 1'b1;
          delay    <= t_next;
          update   <= 1'b1;
          reversal <= (go_up != dir_up);
        end else begin
          timer <= timer - 1'b1;
        end
      end
    end
  end

  // Rules of the loop: a step moves the code by one LSB (or holds it at a
  // saturated end), the code does not move between steps while adapting,
  // and the wait always lies in [T_MIN, T_MAX].
  a_one_lsb: assert property (@(posedge clk) disable iff (!rst_n)
    update |-> (code == CODE_BITS'($past(code) + 1'b1)) ||
               (code == CODE_BITS'($past(code) - 1'b1)) || (code == $past(code)));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ($past(adapt_en) && !update) |-> (code == $past(code)));
  a_delay: assert property (@(posedge clk) disable iff (!rst_n)
    (delay >= TW'(T_MIN)) && (delay <= TW'(T_MAX)));

endmodule
