// data_bus_controller: carries out transfers on the network bus.
//
// The control unit starts one operation with a one-cycle `start`; `done`
// pulses when it is over and `result` holds its value:
//   OP_READ       drive command 00 for one clock; the addressed neuron's
//                 weight is captured (done next clock, result = weight)
//   OP_WRITE      drive command 01 with `wdata` for one clock
//   OP_WRITE_RND  drive command 01 with the random number generator's value
//                 (result = the value written)
//   OP_EVAL       latch x and y as the network inputs, drive command 11 for
//                 one clock, wait for the network (result = +1/-1 output)
// Between operations the bus carries command 10 (idle). The inputs x and y
// stay on `net_x`/`net_y` until the next evaluation. Which operations exist
// follows the original design; the start/done handshake is this design's.
module data_bus_controller
  import nn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  bus_op_e           op,
  input  logic [ADDR_W-1:0] addr,
  input  logic [SEL_W-1:0]  sel,
  input  logic [DATA_W-1:0] wdata,
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] y,
  input  logic [DATA_W-1:0] rnd,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] result,
  // network side
  output nn_bus_t           bus,
  output logic [DATA_W-1:0] net_x,
  output logic [DATA_W-1:0] net_y,
  input  logic [DATA_W-1:0] net_rdata,
  input  logic              net_done,
  input  weight_t           net_out
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e            state;
  bus_op_e           op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [SEL_W-1:0]  sel_q;
  logic [DATA_W-1:0] data_q;

  assign busy = (state != S_IDLE);

  always_comb begin
    bus.cmd  = CMD_IDLE;
    bus.addr = addr_q;
    bus.sel  = sel_q;
    bus.data = data_q;
    if (state == S_ISSUE) begin
      unique case (op_q)
        OP_READ:                bus.cmd = CMD_READ;
        OP_WRITE, OP_WRITE_RND: bus.cmd = CMD_WRITE;
        OP_EVAL:                bus.cmd = CMD_FWD;
        default:                bus.cmd = CMD_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= OP_READ;
      addr_q <= '0;
      sel_q  <= '0;
      data_q <= '0;
      net_x  <= '0;
      net_y  <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_q   <= op;
          addr_q <= addr;
          sel_q  <= sel;
          data_q <= (op == OP_WRITE_RND) ? rnd : wdata;
          if (op == OP_EVAL) begin
            net_x <= x;
            net_y <= y;
          end
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          if (op_q == OP_EVAL) begin
            state <= S_WAIT;
          end else begin
            result <= (op_q == OP_READ) ? net_rdata : data_q;
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        S_WAIT: if (net_done) begin
          result <= net_out;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules: a new operation starts only while idle; done is a pulse
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("data_bus_controller: start while busy");
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done)
    else $error("data_bus_controller: done held for two cycles");
endmodule
