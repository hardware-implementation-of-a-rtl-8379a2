// nn_trainer_top: hardware trainer and three-neuron network for classifying
// points of the x-y plane, controlled over an RS-232 link.
//
// The host sends 4-byte commands on `serial_in`; the serial interface packs
// them into words and queues them (rx_full asks the host to pause). The
// control unit fetches each command and drives the datapath: the memory
// interface keeps the training samples, the data bus controller reads and
// writes neuron weights and runs the network, the random number generator
// supplies trial weights and the error calculator decides whether a trial
// weight is kept. Replies (weights, classifications) go back as 16-bit words,
// two bytes each, on `serial_out`.
// The pins are the five of the original board: clock (25.175 MHz), active-low
// reset, serial in, serial out and rx_full. CLKS_PER_BIT = 2622 is 9600 baud
// at that clock; 218 gives 115200 baud.
module nn_trainer_top
  import nn_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT      = 2622,
  parameter int unsigned RAM_DEPTH         = 256,
  parameter int unsigned TRIALS_PER_NEURON = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic serial_in,
  output logic serial_out,
  output logic rx_full
);
  // serial interface <-> control unit
  logic        rx_empty, rx_pop, tx_full, tx_push, frame_err;
  logic [31:0] rx_word;
  logic [15:0] tx_word;

  // control unit <-> datapath
  logic              bus_start, bus_done, bus_busy;
  bus_op_e           bus_op;
  logic [ADDR_W-1:0] bus_addr;
  logic [SEL_W-1:0]  bus_sel;
  logic [DATA_W-1:0] bus_wdata, bus_result, in_x, in_y, rnd;
  logic              mem_store, mem_rewind, mem_fetch, mem_valid, mem_at_end, mem_full;
  sample_t           mem_sample, mem_rd_sample;
  logic [$clog2(RAM_DEPTH+1)-1:0] mem_count;
  weight_t           err_target, err_y;
  logic              err_load, err_compare, err_improved;
  logic [8:0]        best_err;
  logic              cu_busy;

  // data bus controller <-> network
  nn_bus_t           nbus;
  logic [DATA_W-1:0] net_x, net_y, net_rdata;
  logic              net_busy, net_done;
  weight_t           net_out;

  rs232_interface #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_serial (
    .clk, .rst_n, .serial_in, .serial_out, .rx_full,
    .rx_empty, .rx_pop, .rx_word, .tx_full, .tx_push, .tx_word, .frame_err
  );

  control_unit #(.TRIALS_PER_NEURON(TRIALS_PER_NEURON), .RAM_DEPTH(RAM_DEPTH)) u_cu (
    .clk, .rst_n,
    .rx_empty, .rx_word, .rx_pop, .tx_full, .tx_push, .tx_word,
    .bus_start, .bus_op, .bus_addr, .bus_sel, .bus_wdata, .in_x, .in_y, .bus_done, .bus_result,
    .mem_store, .mem_sample, .mem_rewind, .mem_fetch, .mem_rd_sample, .mem_valid, .mem_at_end, .mem_count,
    .err_target, .err_y, .err_load, .err_compare, .err_improved,
    .busy(cu_busy)
  );

  memory_interface #(.DEPTH(RAM_DEPTH)) u_mem (
    .clk, .rst_n, .store(mem_store), .sample_in(mem_sample), .rewind(mem_rewind), .fetch(mem_fetch),
    .sample_out(mem_rd_sample), .sample_valid(mem_valid), .count(mem_count), .at_end(mem_at_end), .full(mem_full)
  );

  prng u_prng (.clk, .rst_n, .rnd);

  error_calc u_err (
    .clk, .rst_n, .target(err_target), .y(err_y), .load(err_load), .compare(err_compare),
    .improved(err_improved), .best_err
  );

  data_bus_controller u_dbc (
    .clk, .rst_n, .start(bus_start), .op(bus_op), .addr(bus_addr), .sel(bus_sel), .wdata(bus_wdata),
    .x(in_x), .y(in_y), .rnd, .busy(bus_busy), .done(bus_done), .result(bus_result),
    .bus(nbus), .net_x, .net_y, .net_rdata, .net_done, .net_out
  );

  neural_network u_net (
    .clk, .rst_n, .bus(nbus), .x(net_x), .y(net_y), .rdata(net_rdata),
    .busy(net_busy), .done(net_done), .out(net_out)
  );
endmodule
