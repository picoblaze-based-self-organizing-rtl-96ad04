// solar_neuron: one SOLAR neuron, a KCPSM controller with a reprogrammable
// program memory, a registered input multiplexer over the whole array and
// output registers that feed every neuron's multiplexer.
//
// How it works
//   The controller runs the program in its dual-port memory. What the neuron
//   computes (its function), which sources it reads (its connections) and
//   its threshold are all just program words, so rewriting a word through
//   the configuration port changes the neuron while it runs, without
//   touching its neighbours. An INPUT instruction's port address selects
//   the source: port p is source p of `data_in` (external inputs first,
//   then all neuron outputs). An OUTPUT instruction to port VOTE_PORT
//   loads `vote_out`; an OUTPUT to any other port loads `data_out`, the
//   value the rest of the array sees.
//
// Interface and timing
//   cfg_we/cfg_addr/cfg_data write one program word at the rising edge.
//   rst is synchronous and restarts the program at address 0; data_out and
//   vote_out are cleared by it. The controller takes two clocks per
//   instruction; the input multiplexer adds one register stage that hides
//   inside the INPUT instruction; an OUTPUT is visible on data_out the clock
//   after the instruction completes.
//
// The structure (controller, dual-port memory, registered N:1 multiplexer,
// output register, single data output plus an optional vote output) follows
// the document. The interrupt input of the controller is tied low, since
// nothing in the array drives it; the choice of port 02 for the vote output
// is this design's.
module solar_neuron
  import solar_pkg::*;
#(
  parameter int unsigned NIN       = 30,
  parameter byte_t       VOTE_PORT = 8'h02
) (
  input  logic   clk,
  input  logic   rst,
  input  byte_t  data_in [NIN],
  output byte_t  data_out,
  output byte_t  vote_out,
  input  logic   cfg_we,
  input  paddr_t cfg_addr,
  input  instr_t cfg_data
);

  paddr_t address;
  instr_t instruction;
  byte_t  port_id, out_port, in_port;
  logic   read_strobe, write_strobe;

  dp_imem u_imem (
    .clk   (clk),
    .raddr (address),
    .rdata (instruction),
    .we    (cfg_we),
    .waddr (cfg_addr),
    .wdata (cfg_data)
  );

  kcpsm_core u_core (
    .clk          (clk),
    .rst          (rst),
    .interrupt    (1'b0),
    .instruction  (instruction),
    .address      (address),
    .port_id      (port_id),
    .out_port     (out_port),
    .read_strobe  (read_strobe),
    .write_strobe (write_strobe),
    .in_port      (in_port)
  );

  input_mux #(.N(NIN)) u_mux (
    .clk  (clk),
    .din  (data_in),
    .sel  (port_id),
    .dout (in_port)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
      vote_out <= '0;
    end else if (write_strobe) begin
      if (port_id == VOTE_PORT) vote_out <= out_port;
      else                      data_out <= out_port;
    end
  end

endmodule
