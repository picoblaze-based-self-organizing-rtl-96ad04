// pico_solar: single-chip SOLAR (self-organizing learning array) of
// PicoBlaze neurons, ROWS x LAYERS (2 x 14 = 28 neurons by default).
//
// Idea
//   Every neuron is a small 8-bit processor whose program lives in a
//   dual-port memory. The neurons are fully connected: each has an N:1
//   multiplexer (N = neurons + external inputs, 30 here) over the external
//   input registers and the output registers of all neurons, itself
//   included. A neuron's function, its connections (the port addresses of
//   its INPUT instructions) and its threshold are program words, so the
//   network is reshaped at run time by rewriting single words of single
//   neurons while the rest keep running.
//
// Host interface
//   A register bus (write/read strobe, 6-bit address, 32-bit write data,
//   32-bit read data) stands for the PCI interface of the board. See
//   host_regs for the address map: external inputs at 2..ROWS+1, programme
//   reset by reading ROWS+2, configuration word written to ROWS+3, neuron
//   outputs read at Gray-coded addresses. The configuration word
//   {select, data, addr} goes through cfg_bus_ctrl, which writes one
//   program word of one neuron four clocks after the host's write; keep at
//   least five clocks between configuration writes.
//   `vote_out` brings out every neuron's second output register (written
//   by OUTPUT to port 02), used when the neurons vote on a class.
//
// Reset: `rst` resets everything (asynchronously in the host registers,
// synchronously in the neurons). The programme reset restarts all neuron
// programs at address 0 without touching the host registers or the
// program memories.
//
// Array organisation, mux size, configuration bus, register map and the
// default 2 x 14 size follow the document; row-major/layer-major ordering
// of sources (inputs first, then neurons layer by layer) and the vote
// output port are this design's choices.
module pico_solar
  import solar_pkg::*;
#(
  parameter int unsigned ROWS   = 2,
  parameter int unsigned LAYERS = 14,
  localparam int unsigned NN    = ROWS * LAYERS,
  localparam int unsigned NIN   = ROWS + NN
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  write_strobe,
  input  logic  read_strobe,
  input  logic [HADDR_W-1:0] address,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output byte_t vote_out [NN]
);

  initial assert (NN + 1 < (1 << SEL_W))
    else $error("pico_solar: too many neurons for the 5-bit select code");

  byte_t     in_regs [ROWS];
  byte_t     nn_regs [NN];
  byte_t     sources [NIN];
  logic      cfg_wr, prog_rst;
  cfg_word_t cfg_word;
  paddr_t    cfg_addr;
  instr_t    cfg_data;
  logic [SEL_W-1:0] sel_code;
  logic [NN-1:0]    cfg_en;
  logic      nn_rst;

  host_regs #(.ROWS(ROWS), .LAYERS(LAYERS)) u_host (
    .clk          (clk),
    .rst          (rst),
    .write_strobe (write_strobe),
    .read_strobe  (read_strobe),
    .address      (address),
    .wdata        (wdata),
    .rdata        (rdata),
    .in_regs      (in_regs),
    .nn_regs      (nn_regs),
    .cfg_wr       (cfg_wr),
    .cfg_word     (cfg_word),
    .prog_rst     (prog_rst)
  );

  cfg_bus_ctrl #(.NN(NN)) u_cfg (
    .clk      (clk),
    .rst      (rst),
    .wr       (cfg_wr),
    .wdata    (cfg_word),
    .cfg_addr (cfg_addr),
    .cfg_data (cfg_data),
    .sel_code (sel_code),
    .cfg_en   (cfg_en)
  );

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) sources[r] = in_regs[r];
    for (int unsigned k = 0; k < NN; k++)   sources[ROWS + k] = nn_regs[k];
  end

  assign nn_rst = rst || prog_rst;

  for (genvar k = 0; k < NN; k++) begin : g_neuron
    solar_neuron #(.NIN(NIN)) u_neuron (
      .clk      (clk),
      .rst      (nn_rst),
      .data_in  (sources),
      .data_out (nn_regs[k]),
      .vote_out (vote_out[k]),
      .cfg_we   (cfg_en[k]),
      .cfg_addr (cfg_addr),
      .cfg_data (cfg_data)
    );
  end

endmodule
