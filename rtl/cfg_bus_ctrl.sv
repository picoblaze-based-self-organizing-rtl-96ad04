// cfg_bus_ctrl: configuration bus of the neuron array.
//
// The host writes one 29-bit configuration word {select[4:0], data[15:0],
// addr[7:0]} (bits 28..24, 23..8, 7..0). This block latches it, drives the
// address and data fields onto the program-memory buses shared by all
// neurons, decodes the select code and pulses the write enable of exactly
// one neuron's program memory.
//
// Timing (clock edges counted from the edge that samples `wr`):
//   edge 1  the word is latched; addr/data buses change
//   edge 3  the select code reaches the decoder (two register stages)
//   edge 4  the write enable rises (four register stages after `wr`)
//   edge 5  the selected neuron's memory takes the word; the enable falls
// so address, data and select are stable for several clocks around the
// write. Select code k+2 addresses neuron k (0-based, layer-major); codes
// 0, 1 and those above NN+1 select nothing. `rst` is asynchronous; it
// clears the word and the enable delay line and sets the select register
// to all ones (no neuron).
//
// The field layout, the two-stage select and four-stage enable delays and
// the reset values follow the document. The document's decoder holds its
// outputs in latches between codes; here the decoder is combinational,
// which gives the same pulses because the enable is low whenever the code
// changes.
module cfg_bus_ctrl
  import solar_pkg::*;
#(
  parameter int unsigned NN = 28
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      wr,
  input  cfg_word_t wdata,
  output paddr_t    cfg_addr,
  output instr_t    cfg_data,
  output logic [SEL_W-1:0] sel_code,
  output logic [NN-1:0] cfg_en
);

  cfg_word_t        word;
  logic [SEL_W-1:0] sel_d, sel_q;
  logic [3:0]       wren_pipe;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      word      <= '0;
      sel_d     <= '1;
      sel_q     <= '1;
      wren_pipe <= '0;
    end else begin
      if (wr) word <= wdata;
      sel_d     <= word.sel;
      sel_q     <= sel_d;
      wren_pipe <= {wren_pipe[2:0], wr};
    end
  end

  assign cfg_addr = word.addr;
  assign cfg_data = word.data;
  assign sel_code = sel_q;

  always_comb begin
    for (int unsigned k = 0; k < NN; k++)
      cfg_en[k] = wren_pipe[3] && (sel_q == nn_sel_code(k));
  end

  // At most one neuron is written at a time.
  assert property (@(posedge clk) disable iff (rst) $onehot0(cfg_en));

endmodule
