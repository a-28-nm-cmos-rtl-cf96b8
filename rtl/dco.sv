// Behavioural model of the digitally controlled ring oscillator (DCO) of the
// pixel TDC. Not synthesizable: the period of the real ring comes from gate
// delays, which are modelled here with timing controls.
//
// The ring of the chip is a chain of stages made of parallel tri-state
// buffers (fine control: each enabled buffer speeds its stage up), followed
// by a tapped delay line whose tap is chosen by a multiplexer (coarse
// control), closed through a gate that stops the ring when `en` is low.
// That structure follows the document. The model keeps only its effect:
//   period = T_BASE_PS + coarse*T_TAP_PS - fine*T_FINE_PS   (picoseconds)
// The base period (1.2 ns, i.e. below 1 GHz as in the document), the step
// sizes and the code widths are this design's choices.
//
// Timing: START_PS after `en` rises the first rising edge appears; the
// output then toggles every half period, codes being read once per period.
// When `en` falls the output returns low within one half period.
`timescale 1ps/1fs
module dco #(
  parameter real T_BASE_PS = 1200.0,
  parameter real T_TAP_PS  = 40.0,
  parameter real T_FINE_PS = 2.0,
  parameter real START_PS  = 50.0
) (
  input  logic       en,
  input  logic [1:0] coarse,
  input  logic [4:0] fine,
  output logic       clk
);
  real half_ps;

  initial clk = 1'b0;

  always begin
    wait (en);
    #(START_PS);
    while (en) begin
      half_ps = (T_BASE_PS + real'(coarse) * T_TAP_PS - real'(fine) * T_FINE_PS) / 2.0;
      clk = 1'b1;
      #(half_ps);
      clk = 1'b0;
      #(half_ps);
    end
  end
endmodule
