// supply_model: behavioural model of the ROD's switched supplies for the
// testbenches. Each power-good flag follows its switch enable after a fixed
// delay in clocks: VAOK (DSP_VA core supply) after PENA, VCOK (DSP_VCC)
// after PENC, VBOK (VB) after PENB; a flag drops one clock after its enable
// drops. MBPWROK is good after a delay from the start.
module supply_model #(
  parameter int RISE = 20
) (
  input  logic clk,
  input  logic pena, penb, penc,
  output logic mbpwrok, vaok, vbok, vcok
);
  int ta = 0, tb = 0, tc = 0, tm = 0;
  initial begin mbpwrok = 0; vaok = 0; vbok = 0; vcok = 0; end
  always @(posedge clk) begin
    tm = tm + 1;
    ta = pena ? ta + 1 : 0;
    tb = penb ? tb + 1 : 0;
    tc = penc ? tc + 1 : 0;
    mbpwrok <= tm > RISE;
    vaok <= ta > RISE;
    vbok <= tb > RISE;
    vcok <= tc > RISE;
  end
endmodule
