// sar_en_gen: brings RTDR updates into the SAR clock domain and generates SAR_EN.
//
// The RTDR lives in the TCK domain of the IEEE 1687 network while the SAR logic runs on its
// own conversion clock CLK. Each RTDR update toggles upd_toggle; here it passes a two-flop
// synchronizer and an edge detector. On a detected update (and after rst_n) SAR_EN is held
// low for RESET_CYCLES clocks, which keeps the SAR logic in its reset phase; during those
// clocks the SEL and RES fields, stable since the update, are copied into CLK-domain
// registers. Conversion with the new setting starts when SAR_EN rises.
//
// Interface: clk, rst_n (active low, asynchronous), upd_toggle / sel_in / res_in from the
// RTDR, sar_en / sel / res in the CLK domain.
// Timing: SAR_EN falls 3 clocks after the toggle edge (2 synchronizer flops plus the edge
// register) and stays low for exactly RESET_CYCLES clocks.
// The 2-clock reset phase on an update is the reference design's; the synchronizer is this
// implementation's way of crossing between the two clocks.
module sar_en_gen #(
  parameter int unsigned SEL_W        = 1,
  parameter int unsigned RES_W        = 3,
  parameter int unsigned RESET_CYCLES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd_toggle,
  input  logic [SEL_W-1:0] sel_in,
  input  logic [RES_W-1:0] res_in,
  output logic             sar_en,
  output logic [SEL_W-1:0] sel,
  output logic [RES_W-1:0] res
);

  localparam int unsigned CW = $clog2(RESET_CYCLES + 1);

  logic          tog_meta, tog_sync, tog_prev;
  logic [CW-1:0] hold_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_meta <= 1'b0;
      tog_sync <= 1'b0;
      tog_prev <= 1'b0;
      hold_cnt <= CW'(RESET_CYCLES);
      sel      <= '0;
      res      <= '0;
    end else begin
      tog_meta <= upd_toggle;
      tog_sync <= tog_meta;
      tog_prev <= tog_sync;
      if (tog_sync != tog_prev) begin
        hold_cnt <= CW'(RESET_CYCLES);
      end else if (hold_cnt != '0) begin
        hold_cnt <= hold_cnt - 1'b1;
        sel      <= sel_in;
        res      <= res_in;
      end
    end
  end

  assign sar_en = (hold_cnt == '0);

  // The configuration seen by the SAR logic only changes while it is held in reset.
  a_stable_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    (sar_en && $past(sar_en)) |-> ($stable(sel) && $stable(res)))
    else $error("SEL/RES changed while SAR_EN was high");

endmodule
