// ei_mux: selects the analog EI that the shared SAR logic converts.
//
// The SEL field of the RTDR picks one EI. Its comparator output becomes com_out, which both
// feeds the SAR logic and leaves the interface as the serial data wire; the SAR's sample
// and compare strobes are routed to that EI alone, so the others keep their held values and
// their comparators stay idle (output 0). A SEL value beyond the last EI selects none:
// com_out is 0 and no EI is strobed.
//
// Interface: sel, com_in[NUM_EI], sample_in, comp_en_in; com_out, sample_out[NUM_EI],
// comp_en_out[NUM_EI]. Purely combinational.
// Selecting the EI through a multiplexer driven by the RTDR select bits follows the
// reference design; routing the strobes only to the selected EI is this design's choice.
module ei_mux
  import split_sar_pkg::*;
#(
  parameter int unsigned NUM = NUM_EI,
  parameter int unsigned SEL_W = (NUM > 1) ? $clog2(NUM) : 1
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [NUM-1:0]   com_in,
  input  logic             sample_in,
  input  logic             comp_en_in,
  output logic             com_out,
  output logic [NUM-1:0]   sample_out,
  output logic [NUM-1:0]   comp_en_out
);

  always_comb begin
    com_out     = 1'b0;
    sample_out  = '0;
    comp_en_out = '0;
    for (int unsigned i = 0; i < NUM; i++) begin
      if (32'(sel) == i) begin
        com_out        = com_in[i];
        sample_out[i]  = sample_in;
        comp_en_out[i] = comp_en_in;
      end
    end
  end

endmodule
