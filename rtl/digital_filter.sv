// digital_filter: glitch filter between the phase detector and the control block.
//
// The detector's UP_PD/DN_PD are asynchronous pulses whose width is the phase error, and the
// lagging output carries a reset glitch. This filter samples both, and the reference clock,
// with SYNC_STAGES-flop synchronisers clocked by the DCO output clock. A pulse counts only if
// it is seen high in GLITCH_CYC consecutive samples; it then sets UP (or DN) and clears the
// other. Each reference falling edge, as seen through its synchroniser, clears both, so UP/DN
// hold the decision of the comparison made around the last rising reference edge, and both
// stay low when the phase error is within the dead zone (about GLITCH_CYC DCO periods). The
// control block samples UP/DN at the falling reference edge, SYNC_STAGES DCO cycles before
// this clear takes effect. Phase errors beyond a quarter reference period are not resolved
// in time for that sample and show up one cycle late; a pulse still high at the clear keeps
// its decision. The design names a basic digital glitch filter only; the DCO clock,
// the consecutive-sample rule and the clear on the falling reference edge are choices made here.
// Timing: UP/DN change SYNC_STAGES + GLITCH_CYC DCO cycles after a pulse starts.
`timescale 1ps/1ps
module digital_filter #(
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned GLITCH_CYC  = 2
) (
  input  logic clk,       // DCO output clock
  input  logic rst_n,
  input  logic clk_ref,
  input  logic up_pd,
  input  logic dn_pd,
  output logic up,
  output logic dn
);

  localparam int unsigned CW = $clog2(GLITCH_CYC + 1);

  logic [SYNC_STAGES-1:0] up_sync, dn_sync, ref_sync;
  logic                   ref_q;
  logic [CW-1:0]          up_cnt, dn_cnt;
  logic                   up_s, dn_s, ref_fall, up_hit, dn_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_sync  <= '0;
      dn_sync  <= '0;
      ref_sync <= '0;
      ref_q    <= 1'b0;
    end else begin
      up_sync  <= {up_sync[SYNC_STAGES-2:0], up_pd};
      dn_sync  <= {dn_sync[SYNC_STAGES-2:0], dn_pd};
      ref_sync <= {ref_sync[SYNC_STAGES-2:0], clk_ref};
      ref_q    <= ref_sync[SYNC_STAGES-1];
    end
  end

  assign up_s     = up_sync[SYNC_STAGES-1];
  assign dn_s     = dn_sync[SYNC_STAGES-1];
  assign ref_fall = ~ref_sync[SYNC_STAGES-1] & ref_q;
  // this sample is at least the GLITCH_CYC-th consecutive high sample; a pulse that is still
  // high when the clear comes (phase error beyond half a reference period) is kept
  assign up_hit   = up_s && (up_cnt >= CW'(GLITCH_CYC - 1));
  assign dn_hit   = dn_s && (dn_cnt >= CW'(GLITCH_CYC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_cnt <= '0;
      dn_cnt <= '0;
      up     <= 1'b0;
      dn     <= 1'b0;
    end else begin
      up_cnt <= !up_s ? '0 : (up_cnt == CW'(GLITCH_CYC)) ? up_cnt : up_cnt + 1'b1;
      dn_cnt <= !dn_s ? '0 : (dn_cnt == CW'(GLITCH_CYC)) ? dn_cnt : dn_cnt + 1'b1;
      if (up_hit) begin
        up <= 1'b1;
        dn <= 1'b0;
      end else if (dn_hit) begin
        up <= 1'b0;
        dn <= 1'b1;
      end else if (ref_fall) begin
        up <= 1'b0;
        dn <= 1'b0;
      end
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(up && dn));

endmodule
