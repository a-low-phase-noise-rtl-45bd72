`timescale 1ps/1ps
// Phase detector (PD) of the fine tune loop, with a dead zone.
//
// Int_clk is sampled twice per reference cycle: at the rising edge of Ref_clk
// and at the rising edge of Ref_clk_late, a copy of Ref_clk delayed by the
// dead-zone width. High at both samples means Int_clk rose before Ref_clk
// (Int_clk leads, the line is too short): Up_F. Low at both means Int_clk
// rose after the late copy (Int_clk lags, the line is too long): Dn_F. Low
// then high means the Int_clk edge fell inside the dead zone and neither
// output is set, which stops the counter. The decision is registered on the
// next Ref_clk rising edge as one of HOLD, UP and DN and holds for one
// Ref_clk cycle; Up_F and Dn_F are decoded from it.
//
// Lead/lag detection and the dead zone follow the design description; the
// two-sample circuit and the one-sided window [0, dead zone] after the
// Ref_clk edge are this design's choices.
module phase_detector (
  input  logic ref_clk,
  input  logic ref_clk_late,
  input  logic int_clk,
  output logic up,
  output logic dn
);

  typedef enum logic [1:0] {
    PD_HOLD = 2'b00,   // edge inside the dead zone (or samples disagree)
    PD_UP   = 2'b01,   // Int_clk leads: more delay
    PD_DN   = 2'b10    // Int_clk lags: less delay
  } pd_dec_e;

  logic    early_q, late_q;
  pd_dec_e dec;

  always_ff @(posedge ref_clk)      early_q <= int_clk;
  always_ff @(posedge ref_clk_late) late_q  <= int_clk;

  always_ff @(posedge ref_clk) begin
    if (early_q && late_q)        dec <= PD_UP;
    else if (!early_q && !late_q) dec <= PD_DN;
    else                          dec <= PD_HOLD;
  end

  // one decision register, so Up_F and Dn_F can never be high together
  assign up = (dec == PD_UP);
  assign dn = (dec == PD_DN);

  // the counter is never asked to move both ways at once
  a_up_dn_exclusive: assert property (@(posedge ref_clk) !(up && dn));

endmodule
