// dp_imem: dual-port 256 x 16-bit instruction memory of one neuron.
//
// Port A is the neuron controller's read-only fetch port; port B is the
// configuration write port shared (through the configuration bus) by all
// neurons. The two ports are independent, so a neuron's program can be
// rewritten while its controller keeps running; only the neuron whose
// write enable is raised is affected.
//
// Timing: port A is a synchronous read (data appear the clock after the
// address), as in an FPGA block RAM. Port B writes `wdata` to `waddr` at the
// rising edge when `we` is high. When both ports touch the same word in the
// same cycle, port A returns the old contents.
//
// The memory powers up holding the same start-up program in every neuron
// (solar_pkg::boot_word, a loop adding the two external inputs). The size
// and the dual-port organisation follow the document; the read-first
// collision rule and the start-up program encoding are this design's choice.
module dp_imem
  import solar_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 16
) (
  input  logic          clk,
  // port A: instruction fetch
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  // port B: configuration write
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++)
      mem[a] = DW'(boot_word(PADDR_W'(a)));
  end

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
