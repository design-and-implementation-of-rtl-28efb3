// coef_mem: local coefficient memory of one neural processor.
//
// 256 words of 6 bits, as in the published neuron: one coefficient per input
// pixel. A single port serves both loading (write, from the configuration
// bus) and classification (read). The read is synchronous: the word at 'addr'
// appears on 'rdata' one clock after 'en' is high with 'we' low. A write
// leaves 'rdata' unchanged. The single-port, registered-read organisation is
// this design's choice; the document gives only size and word width.
module coef_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 6,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
