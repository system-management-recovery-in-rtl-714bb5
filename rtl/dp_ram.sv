// dp_ram: dual-port private memory of a PE.
//
// Port A belongs to the processor (through the wrapper), port B to the DMNI,
// which can therefore read and write the memory even when the processor is
// faulty and isolated. Both ports are synchronous: a read issued in cycle t
// returns its word in cycle t+1, and a port's read register holds its value
// until that port reads again (a write does not disturb it). A simultaneous
// write to the same word from both ports leaves port B's data.
// The size default is the 64 KB that a manager kernel occupies in the
// document's experiments; the word width, the port timing and the absence of
// the error-correcting code that the document assumes are this design's own.
module dp_ram
  import mcsoc_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: processor
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  word_t         a_wdata,
  output word_t         a_rdata,
  // port B: DMNI
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  word_t         b_wdata,
  output word_t         b_rdata
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

endmodule
