// vco10_model: behavioural ten-phase VCO for simulation only.
//
// Produces NPH phases of one clock, phase j delayed by j/NPH of a period.
// Internally the model advances in steps of 1/NPH UI: at step n phase n mod NPH
// rises and phase (n + NPH/2) mod NPH falls, so at any moment the last phase
// to have risen is nstep mod NPH.  The period is the variable `period_ns`,
// which the testbench may change at any time; `sigma_ns` adds Gaussian
// random-walk jitter to every step (a free-running oscillator's 1/f^2 phase
// noise).  Step times are rounded to the 1 ps precision; a step that would
// land exactly on a multiple of AVOID_PS (the reference clock's half period)
// is moved by 1 ps so that the reference never samples a phase edge in the
// same time slot.  theta(t) returns the phase in UI.
module vco10_model #(
  parameter int NPH      = 10,
  parameter int AVOID_PS = 25000
) (
  output logic [NPH-1:0] ph
);
  real     period_ns = 50.0 / 60.0;
  real     sigma_ns  = 0.0;
  longint  nstep     = 0;
  real     t_next    = 0.0;
  real     t_last    = 0.0;   // time of the last step, ns
  real     t_step    = 50.0 / 600.0;

  // Phase in UI at time t (t not before the last step).
  function automatic real theta(real t);
    return (real'(nstep) + (t - t_last) / t_step) / real'(NPH);
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1 << 20)) / real'(1 << 20);
    return s - 6.0;
  endfunction

  initial begin
    for (int j = 0; j < NPH; j++)
      ph[j] = ((NPH - j) % NPH) < NPH / 2;   // phases 0, NPH-1 .. NPH/2+1 high
    forever begin
      longint tps;
      t_next = t_next + period_ns / NPH + sigma_ns * gauss();
      tps = longint'(t_next * 1000.0);
      if (tps % AVOID_PS == 0) tps = tps + 1;
      #(real'(tps) / 1000.0 - $realtime);
      nstep  = nstep + 1;
      t_step = real'(tps) / 1000.0 - t_last;
      t_last = real'(tps) / 1000.0;
      ph[int'(nstep % NPH)]               = 1'b1;
      ph[int'((nstep + NPH / 2) % NPH)]   = 1'b0;
    end
  end
endmodule
