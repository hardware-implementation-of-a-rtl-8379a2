// control_unit: the trainer's state machine.
//
// It waits in S_IDLE for a 4-byte command word in the receive FIFO (command
// byte in [31:24], data bytes below it), carries it out and returns to idle:
//   01 x y t    train from serial data: store the sample in RAM, train on it
//   02 eh el -  train from RAM: run {eh,el} epochs over all stored samples
//   03 - - -    return weights: send {neuron, select, weight} for every weight
//   04 n s w    load weight w into weight s of neuron n
//   05 x y -    evaluate: send {F0, output}
// Training on one sample is the univariate random optimisation: evaluate the
// network and keep its error as the best; then, for each neuron and
// TRIALS_PER_NEURON times, read one weight, replace it by a random value,
// evaluate again, and keep the new value only if the error calculator reports
// the output strictly closer to the target, else write the old value back.
// The trial weight cycles through the neuron's weights.
// Every bus transfer is a call to the data bus controller (start/done) that
// returns to the state in `ret`; every reply is a push into the transmit FIFO
// that waits while it is full. The modes, the keep-if-better rule and six
// trials per neuron follow the original design; command codes, byte layouts
// and trial order are this design's.
module control_unit
  import nn_pkg::*;
#(
  parameter int unsigned TRIALS_PER_NEURON = 6,
  parameter int unsigned RAM_DEPTH         = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // receive FIFO
  input  logic              rx_empty,
  input  logic [31:0]       rx_word,
  output logic              rx_pop,
  // transmit FIFO
  input  logic              tx_full,
  output logic              tx_push,
  output logic [15:0]       tx_word,
  // data bus controller
  output logic              bus_start,
  output bus_op_e           bus_op,
  output logic [ADDR_W-1:0] bus_addr,
  output logic [SEL_W-1:0]  bus_sel,
  output logic [DATA_W-1:0] bus_wdata,
  output logic [DATA_W-1:0] in_x,
  output logic [DATA_W-1:0] in_y,
  input  logic              bus_done,
  input  logic [DATA_W-1:0] bus_result,
  // memory interface
  output logic              mem_store,
  output sample_t           mem_sample,
  output logic              mem_rewind,
  output logic              mem_fetch,
  input  sample_t           mem_rd_sample,
  input  logic              mem_valid,
  input  logic              mem_at_end,
  input  logic [$clog2(RAM_DEPTH+1)-1:0] mem_count,
  // error calculator
  output weight_t           err_target,
  output weight_t           err_y,
  output logic              err_load,
  output logic              err_compare,
  input  logic              err_improved,
  // status
  output logic              busy
);
  typedef enum logic [4:0] {
    S_IDLE, S_DECODE, S_BUS_WAIT, S_TX,
    S_EVAL_REPLY, S_RET_READ, S_RET_SEND, S_RET_NEXT,
    S_FETCH, S_FETCH_WAIT,
    S_TR_EVAL0, S_TR_LOAD, S_TR_READ, S_TR_RAND, S_TR_EVAL, S_TR_CMP,
    S_TR_JUDGE, S_TR_NEXT, S_TR_END
  } state_e;

  localparam int unsigned KW = $clog2(TRIALS_PER_NEURON + 1);

  state_e            state, ret;
  logic [31:0]       cmd_q;
  host_cmd_e         opc;
  logic [ADDR_W-1:0] n_q;      // neuron under training / being returned
  logic [SEL_W-1:0]  s_q;      // weight select
  logic [KW-1:0]     k_q;      // trial number within a neuron
  logic [DATA_W-1:0] w_old;
  logic [15:0]       epochs_left;
  logic              from_ram;

  assign opc  = host_cmd_e'(cmd_q[31:24]);
  assign busy = (state != S_IDLE);

  assign rx_pop      = (state == S_IDLE) && !rx_empty;
  assign tx_push     = (state == S_TX) && !tx_full;
  assign err_load    = (state == S_TR_LOAD);
  assign err_compare = (state == S_TR_CMP);
  assign err_y       = weight_t'(bus_result);

  assign mem_store   = (state == S_DECODE) && (opc == HC_TRAIN_SERIAL);
  assign mem_sample  = sample_t'(cmd_q[23:0]);
  assign mem_fetch   = (state == S_FETCH) && !mem_at_end;
  assign mem_rewind  = ((state == S_DECODE) && (opc == HC_TRAIN_RAM)) ||
                       ((state == S_FETCH) && mem_at_end);

  // target byte: bit 7 set means -1, else +1
  function automatic weight_t target_of(input logic t_sign);
    return t_sign ? weight_t'(-1) : weight_t'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ret         <= S_IDLE;
      cmd_q       <= '0;
      n_q         <= '0;
      s_q         <= '0;
      k_q         <= '0;
      w_old       <= '0;
      epochs_left <= '0;
      from_ram    <= 1'b0;
      tx_word     <= '0;
      bus_start   <= 1'b0;
      bus_op      <= OP_READ;
      bus_addr    <= '0;
      bus_sel     <= '0;
      bus_wdata   <= '0;
      in_x        <= '0;
      in_y        <= '0;
      err_target  <= weight_t'(1);
    end else begin
      bus_start <= 1'b0;
      unique case (state)
        S_IDLE: if (!rx_empty) begin
          cmd_q <= rx_word;
          state <= S_DECODE;
        end

        S_DECODE: begin
          unique case (opc)
            HC_TRAIN_SERIAL: begin
              in_x       <= cmd_q[23:16];
              in_y       <= cmd_q[15:8];
              err_target <= target_of(cmd_q[7]);
              from_ram   <= 1'b0;
              state      <= S_TR_EVAL0;
            end
            HC_TRAIN_RAM: begin
              epochs_left <= cmd_q[23:8];
              from_ram    <= 1'b1;
              state       <= (cmd_q[23:8] == 16'd0 || mem_count == '0) ? S_IDLE : S_FETCH;
            end
            HC_RETURN_W: begin
              n_q   <= '0;
              s_q   <= '0;
              state <= S_RET_READ;
            end
            HC_LOAD_W: begin
              bus_start <= 1'b1;
              bus_op    <= OP_WRITE;
              bus_addr  <= cmd_q[16+:ADDR_W];
              bus_sel   <= cmd_q[8+:SEL_W];
              bus_wdata <= cmd_q[7:0];
              ret       <= S_IDLE;
              state     <= S_BUS_WAIT;
            end
            HC_EVALUATE: begin
              in_x      <= cmd_q[23:16];
              in_y      <= cmd_q[15:8];
              bus_start <= 1'b1;
              bus_op    <= OP_EVAL;
              ret       <= S_EVAL_REPLY;
              state     <= S_BUS_WAIT;
            end
            default: state <= S_IDLE;   // unknown command: ignored
          endcase
        end

        S_BUS_WAIT: if (bus_done) state <= ret;

        S_TX: if (!tx_full) state <= ret;

        S_EVAL_REPLY: begin
          tx_word <= {EVAL_TAG, bus_result};
          ret     <= S_IDLE;
          state   <= S_TX;
        end

        // ---------------- return weights ----------------
        S_RET_READ: begin
          bus_start <= 1'b1;
          bus_op    <= OP_READ;
          bus_addr  <= n_q;
          bus_sel   <= s_q;
          ret       <= S_RET_SEND;
          state     <= S_BUS_WAIT;
        end
        S_RET_SEND: begin
          tx_word <= {4'(n_q), 4'(s_q), bus_result};
          ret     <= S_RET_NEXT;
          state   <= S_TX;
        end
        S_RET_NEXT: begin
          if (s_q == SEL_W'(N_W - 1)) begin
            s_q <= '0;
            n_q <= n_q + 1'b1;
            state <= (n_q == ADDR_W'(N_NEURON - 1)) ? S_IDLE : S_RET_READ;
          end else begin
            s_q   <= s_q + 1'b1;
            state <= S_RET_READ;
          end
        end

        // ---------------- epochs from RAM ----------------
        S_FETCH: begin
          if (mem_at_end) begin
            // an epoch is over (mem_rewind is high in this cycle)
            epochs_left <= epochs_left - 1'b1;
            if (epochs_left == 16'd1) state <= S_IDLE;
          end else begin
            state <= S_FETCH_WAIT;
          end
        end
        S_FETCH_WAIT: if (mem_valid) begin
          in_x       <= mem_rd_sample.x;
          in_y       <= mem_rd_sample.y;
          err_target <= target_of(mem_rd_sample.t[7]);
          state      <= S_TR_EVAL0;
        end

        // ---------------- training on one sample ----------------
        S_TR_EVAL0: begin
          bus_start <= 1'b1;
          bus_op    <= OP_EVAL;
          ret       <= S_TR_LOAD;
          state     <= S_BUS_WAIT;
        end
        S_TR_LOAD: begin          // err_load: best = error with current weights
          n_q   <= '0;
          s_q   <= '0;
          k_q   <= '0;
          state <= S_TR_READ;
        end
        S_TR_READ: begin
          bus_start <= 1'b1;
          bus_op    <= OP_READ;
          bus_addr  <= n_q;
          bus_sel   <= s_q;
          ret       <= S_TR_RAND;
          state     <= S_BUS_WAIT;
        end
        S_TR_RAND: begin
          w_old     <= bus_result;
          bus_start <= 1'b1;
          bus_op    <= OP_WRITE_RND;
          ret       <= S_TR_EVAL;
          state     <= S_BUS_WAIT;
        end
        S_TR_EVAL: begin
          bus_start <= 1'b1;
          bus_op    <= OP_EVAL;
          ret       <= S_TR_CMP;
          state     <= S_BUS_WAIT;
        end
        S_TR_CMP: state <= S_TR_JUDGE;   // err_compare
        S_TR_JUDGE: begin
          if (err_improved) begin
            state <= S_TR_NEXT;          // keep the random weight
          end else begin                 // restore the old weight
            bus_start <= 1'b1;
            bus_op    <= OP_WRITE;
            bus_wdata <= w_old;
            ret       <= S_TR_NEXT;
            state     <= S_BUS_WAIT;
          end
        end
        S_TR_NEXT: begin
          s_q <= (s_q == SEL_W'(N_W - 1)) ? '0 : s_q + 1'b1;
          if (k_q == KW'(TRIALS_PER_NEURON - 1)) begin
            k_q <= '0;
            s_q <= '0;
            n_q <= n_q + 1'b1;
            state <= (n_q == ADDR_W'(N_NEURON - 1)) ? S_TR_END : S_TR_READ;
          end else begin
            k_q   <= k_q + 1'b1;
            state <= S_TR_READ;
          end
        end
        S_TR_END: state <= from_ram ? S_FETCH : S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules with the data bus controller and the transmit FIFO
  a_done_expected: assert property (@(posedge clk) disable iff (!rst_n) bus_done |-> state == S_BUS_WAIT)
    else $error("control_unit: bus done while not waiting for it");
  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) tx_push |-> !tx_full)
    else $error("control_unit: push into a full transmit FIFO");
endmodule
