// power_pld: power-enable sequencing logic of the ROD.
//
// The ROD takes 3.3 V and 5.0 V from the backplane and switches them through
// current-limiting switches: PENC enables DSP_VCC (3.3 V), PENB the 2.5 V VB
// converter, PENA the DSP core converter DSP_VA (1.8 V). The PLD turns the
// switches on only while the PED bit (power enable, written over VME) is set
// and the motherboard supplies are good (MBPWROK), and sequences them from
// the supervisor/comparator flags VAOK and VCOK:
//   PENC = PED & MBPWROK & (ONE_O | VAOK)
//   PENA = PED & MBPWROK & (ONE_O | VCOK)
//   PENB = PED & MBPWROK & VAOK & VCOK
// ONE_O is a one-second one-shot started when PED is set: during that
// second the DSP I/O and core supplies may come up together; after it each
// stays on only while the other is good, so a failed VCC or VCORE turns both
// off. These equations are the design's; the enables are active high.
// The 2.5 V bank also has two inrush switches that are turned off after the
// initial current surge; their control is not defined and has no output here.
// MBRESET_N (motherboard reset to the supervisor) follows SYSRESET_N from
// VME. The supply flags are asynchronous and pass through two-flop
// synchronisers, so an enable follows a flag after two to three clocks.
// Clock frequency, reset value of PED (0: the crate controller starts the
// ROD), the status readback and the synchronisers are this design's choices.
module power_pld #(
  parameter int unsigned ONE_SEC_CYCLES = 40_000_000   // 1 s at 40 MHz
) (
  input  logic       clk,
  input  logic       por_n,        // power-on reset of the PLD
  input  logic       ped_wr,       // VME write of the PED bit
  input  logic       ped_wdata,
  input  logic       mbpwrok,
  input  logic       vaok,
  input  logic       vbok,
  input  logic       vcok,
  input  logic       sysreset_n,
  output logic       pena,
  output logic       penb,
  output logic       penc,
  output logic       mbreset_n,
  output logic       ped,
  output logic       one_o,
  output logic [5:0] status        // {one_o, ped, vcok, vbok, vaok, mbpwrok}
);
  localparam int unsigned CW = $clog2(ONE_SEC_CYCLES + 1);
  logic [4:0] s1, s2;              // {sysreset_n, vcok, vbok, vaok, mbpwrok}
  logic [CW-1:0] timer;
  logic mbpwrok_s, vaok_s, vbok_s, vcok_s;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= {sysreset_n, vcok, vbok, vaok, mbpwrok};
      s2 <= s1;
    end
  end
  assign {mbreset_n, vcok_s, vbok_s, vaok_s, mbpwrok_s} = s2;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      ped   <= 1'b0;
      timer <= '0;
    end else begin
      if (ped_wr) ped <= ped_wdata;
      if (ped_wr && ped_wdata && !ped) timer <= CW'(ONE_SEC_CYCLES);
      else if (timer != '0)            timer <= timer - 1'b1;
    end
  end
  assign one_o = (timer != '0);

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      pena <= 1'b0;
      penb <= 1'b0;
      penc <= 1'b0;
    end else begin
      penc <= ped && mbpwrok_s && (one_o || vaok_s);
      pena <= ped && mbpwrok_s && (one_o || vcok_s);
      penb <= ped && mbpwrok_s && vaok_s && vcok_s;
    end
  end

  assign status = {one_o, ped, vcok_s, vbok_s, vaok_s, mbpwrok_s};
endmodule
