// sar_logic: shared, resolution-configurable successive-approximation controller.
//
// One instance serves every analog EI. It cycles through the states of split_sar_pkg:
//   SAR_RESET    while sar_en is low (after reset, and for two clocks after an RTDR update);
//   SAR_SAMPLE   one clock with `sample` high; the selected EI's S/H tracks its input and
//                holds it at the falling edge of `sample`; RES is latched here;
//   SAR_BITCYCLE N_EI clocks, N_EI = res + 1. In cycle k the DAC code is the bits decided so
//                far plus a trial one at position N-1-k; the comparator answers on `com`
//                (1: held input above the DAC output) and the trial bit is kept or dropped
//                at the clock edge that ends the cycle;
//   SAR_EOC      one clock with `eoc` high and DOUT holding the new result; the DAC keeps
//                the final code, i.e. the converged approximation.
// A conversion therefore takes N_EI + 2 clocks, and the selected comparator's output during
// the bit-cycling clocks is already the result, MSB first: with the comparator held at 0
// outside bit cycling, that single wire is a serial stream of N_EI + 2 bits per sample.
//
// Only the N_EI most significant DAC bits are used; DOUT is the N_EI-bit result right
// aligned (LSB = VREF / 2**N_EI) and stays valid until the next EOC. res codes above N-1
// (possible only when N is not a power of two) are treated as N-1.
//
// Interface: clk, rst_n (asynchronous, active low), sar_en (synchronous hold in SAR_RESET),
// res (resolution minus one), com; outputs sample, comp_en (high in bit cycling), eoc,
// dac_code, dout, state.
// The states, the N_EI + 2 clock conversion and the resolution taken from the RTDR follow
// the reference design; the minus-one resolution code, DOUT alignment and clearing DOUT in
// the reset phase are choices of this implementation.
module sar_logic
  import split_sar_pkg::*;
#(
  parameter int unsigned N     = DAC_BITS,
  parameter int unsigned RES_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sar_en,
  input  logic [RES_W-1:0] res,
  input  logic             com,
  output logic             sample,
  output logic             comp_en,
  output logic             eoc,
  output logic [N-1:0]     dac_code,
  output logic [N-1:0]     dout,
  output sar_state_e       state
);

  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;

  sar_state_e     state_q;
  logic [KW-1:0]  bit_q;    // index k of the bit being decided, 0 = MSB
  logic [KW-1:0]  last_q;   // N_EI - 1 latched in SAR_SAMPLE
  logic [N-1:0]   sar_q;    // bits decided so far, MSB aligned
  logic [N-1:0]   trial;    // one-hot trial bit of the current cycle
  logic [N-1:0]   decided;  // sar_q with the current cycle's decision applied
  logic [KW-1:0]  res_clamped;

  always_comb begin
    if (32'(res) > N - 1) res_clamped = KW'(N - 1);
    else                  res_clamped = KW'(res);
  end

  assign trial   = N'(1) << (KW'(N - 1) - bit_q);
  assign decided = com ? (sar_q | trial) : sar_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= SAR_RESET;
      bit_q   <= '0;
      last_q  <= '0;
      sar_q   <= '0;
      dout    <= '0;
    end else if (!sar_en) begin
      state_q <= SAR_RESET;
      bit_q   <= '0;
      sar_q   <= '0;
      dout    <= '0;
    end else begin
      unique case (state_q)
        SAR_RESET: begin
          state_q <= SAR_SAMPLE;
        end
        SAR_SAMPLE: begin
          last_q  <= res_clamped;
          bit_q   <= '0;
          sar_q   <= '0;
          state_q <= SAR_BITCYCLE;
        end
        SAR_BITCYCLE: begin
          sar_q <= decided;
          if (bit_q == last_q) begin
            dout    <= decided >> (KW'(N - 1) - last_q);
            state_q <= SAR_EOC;
          end else begin
            bit_q <= bit_q + 1'b1;
          end
        end
        SAR_EOC: begin
          state_q <= SAR_SAMPLE;
        end
        default: state_q <= SAR_RESET;
      endcase
    end
  end

  always_comb begin
    unique case (state_q)
      SAR_BITCYCLE: dac_code = sar_q | trial;
      SAR_EOC:      dac_code = sar_q;
      default:      dac_code = '0;
    endcase
  end

  assign sample  = (state_q == SAR_SAMPLE);
  assign comp_en = (state_q == SAR_BITCYCLE);
  assign eoc     = (state_q == SAR_EOC);
  assign state   = state_q;

  // Protocol rules of the conversion sequence.
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({sample, comp_en, eoc}))
    else $error("sample, bit-cycling and EOC overlap");
  a_sample_then_bits: assert property (@(posedge clk) disable iff (!rst_n)
    (sample && sar_en) |=> comp_en)
    else $error("bit cycling must follow the sampling clock");
  a_eoc_then_sample: assert property (@(posedge clk) disable iff (!rst_n)
    (eoc && sar_en) |=> sample)
    else $error("a new sample must follow EOC");
  a_reset_phase: assert property (@(posedge clk) disable iff (!rst_n)
    !sar_en |=> (state_q == SAR_RESET))
    else $error("SAR_EN low must hold the reset phase");

endmodule
