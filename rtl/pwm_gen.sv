// pwm_gen: the PWM stage of the AXI timer.
//
// The PWM output is set by the generate pulse of counter 0 and cleared by the generate pulse of
// counter 1, so counter 0 fixes the period and counter 1 the high time. Both are one-clock
// pulses. The output is a flip-flop: it changes in the clock after the pulse. If both pulses come
// in the same clock the set wins (a high time equal to the period gives a constant high output);
// while `enable` (PWM mode) is low the output is held low. The set/clear rule is the timer's
// documented behaviour; the tie rule and the forced low are this design's choices.
module pwm_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic gen0,
  input  logic gen1,
  output logic pwm
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pwm <= 1'b0;
    else if (!enable) pwm <= 1'b0;
    else if (gen0)    pwm <= 1'b1;
    else if (gen1)    pwm <= 1'b0;
  end

endmodule
