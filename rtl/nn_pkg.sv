// nn_pkg: types and constants shared by the neural network trainer.
//
// The network bus carries a 2-bit command, a neuron address, a weight
// select and an 8-bit data word. The command encoding (00 read, 01 write,
// 10 idle, 11 forward calculation) follows the original design; the host
// opcode values and the widths of address and select are choices of this
// implementation.
package nn_pkg;

  localparam int unsigned DATA_W   = 8;   // weights and inputs are 8-bit integers
  localparam int unsigned ADDR_W   = 2;   // neuron address (three neurons)
  localparam int unsigned SEL_W    = 2;   // weight select inside a neuron
  localparam int unsigned N_NEURON = 3;   // two hidden, one output
  localparam int unsigned N_IN     = 2;   // inputs per neuron (x,y or two hidden outputs)
  localparam int unsigned N_W      = N_IN + 1; // plus a bias weight

  typedef logic signed [DATA_W-1:0] weight_t;
  typedef logic signed [DATA_W:0]   nin_t;   // 9-bit so 0..255 stays positive

  // Command bus of the neurons.
  typedef enum logic [1:0] {
    CMD_READ  = 2'b00,  // addressed neuron drives the selected weight out
    CMD_WRITE = 2'b01,  // addressed neuron stores the data bus in the selected weight
    CMD_IDLE  = 2'b10,
    CMD_FWD   = 2'b11   // begin forward calculation
  } nn_cmd_e;

  typedef struct packed {
    nn_cmd_e             cmd;
    logic [ADDR_W-1:0]   addr;
    logic [SEL_W-1:0]    sel;
    logic [DATA_W-1:0]   data;  // input data bus (towards the neurons)
  } nn_bus_t;

  // Operations the control unit asks of the data bus controller.
  typedef enum logic [1:0] {
    OP_READ      = 2'd0,  // read one weight
    OP_WRITE     = 2'd1,  // write one weight from the control unit
    OP_WRITE_RND = 2'd2,  // write a fresh random weight
    OP_EVAL      = 2'd3   // run the network on the held inputs
  } bus_op_e;

  // First byte of a 4-byte host command.
  typedef enum logic [7:0] {
    HC_TRAIN_SERIAL = 8'h01,  // x, y, target: store to RAM and train on it
    HC_TRAIN_RAM    = 8'h02,  // epochs[15:8], epochs[7:0]: train from RAM
    HC_RETURN_W     = 8'h03,  // send back every weight
    HC_LOAD_W       = 8'h04,  // neuron, select, value
    HC_EVALUATE     = 8'h05   // x, y: send back the classification
  } host_cmd_e;

  localparam logic [7:0] EVAL_TAG = 8'hF0;  // high byte of an evaluate reply

  // Bytes of a stored training sample.
  typedef struct packed {
    logic [7:0] x;
    logic [7:0] y;
    logic [7:0] t;   // target: bit 7 set means -1, else +1
  } sample_t;

endpackage
