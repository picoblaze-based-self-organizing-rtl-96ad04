// host_regs: host-side register file and address decoder of the array.
//
// The host (through the PCI interface) sees a 6-bit register address space
// with write and read strobes:
//   write 2+r        external input r (one 8-bit register per array row;
//                    these act as the neurons of layer 0)
//   write 3+ROWS     configuration word -> cfg_wr strobe to cfg_bus_ctrl
//   read  2+r        external input r
//   read  2+ROWS     programme reset: one-clock prog_rst pulse that
//                    restarts every neuron's program at address 0
//   read  gray(k+8)  output register of neuron k (k layer-major, 0-based)
// For the two-row array this is 2, 3 (inputs), 4 (reset), 5 (config) and
// 12, 13, 15, 14, 10, 11, 9, 8, 24, ... 51, 50 for neurons (1,1)..(14,2).
// Addresses 0 and 1 belong to the PCI interface and are not decoded here.
//
// Readback is an AND-OR multiplexer: each register is ANDed with its decoded
// read select and the results are ORed onto `rdata`, which is
// combinational and valid while `read_strobe` is high; it is 0 otherwise.
// The input registers reset asynchronously to 0.
//
// The address map (including the Gray-coded neuron addresses) and the
// AND-based readback follow the document; the generalisation of the map to
// other row counts is this design's choice.
module host_regs
  import solar_pkg::*;
#(
  parameter int unsigned ROWS   = 2,
  parameter int unsigned LAYERS = 14,
  localparam int unsigned NN    = ROWS * LAYERS
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  write_strobe,
  input  logic  read_strobe,
  input  logic [HADDR_W-1:0] address,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output byte_t in_regs [ROWS],
  input  byte_t nn_regs [NN],
  output logic  cfg_wr,
  output cfg_word_t cfg_word,
  output logic  prog_rst
);

  // The map must leave the Gray-coded neuron addresses (>= 8) free.
  initial assert (3 + ROWS < 8 && NN + 8 <= (1 << HADDR_W))
    else $error("host_regs: register map does not fit");

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int unsigned r = 0; r < ROWS; r++) in_regs[r] <= '0;
    end else if (write_strobe) begin
      for (int unsigned r = 0; r < ROWS; r++)
        if (address == in_reg_addr(r)) in_regs[r] <= wdata[DATA_W-1:0];
    end
  end

  assign cfg_wr   = write_strobe && (address == cfg_reg_addr(ROWS));
  assign cfg_word = wdata[CFG_W-1:0];
  assign prog_rst = read_strobe && (address == prog_rst_addr(ROWS));

  always_comb begin
    byte_t acc;
    acc = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      acc |= in_regs[r] & {DATA_W{read_strobe && address == in_reg_addr(r)}};
    for (int unsigned k = 0; k < NN; k++)
      acc |= nn_regs[k] & {DATA_W{read_strobe && address == nn_rd_addr(k)}};
    rdata = {24'h0, acc};
  end

endmodule
