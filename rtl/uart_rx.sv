// uart_rx: RS-232 receiver, 8 data bits, no parity, one stop bit.
//
// The line idles high. A falling edge starts a frame; the start bit is
// checked again at its middle (a glitch is ignored), then each data bit is
// sampled in the middle of its bit time, least significant bit first, and
// finally the stop bit. A good frame gives a one-cycle `valid` strobe with
// the byte on `data`; a frame whose stop bit reads 0 is discarded and gives a
// one-cycle `frame_err` strobe instead, which is how the original serial port
// "ignores packets that don't follow a standard RS232 format".
// The input passes a two-flop synchroniser first (a choice of this design).
// CLKS_PER_BIT is clock frequency / baud rate; 2622 is 25.175 MHz at 9600 baud.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 2622
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic          sync1, sync2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= 1'b1;
      sync2 <= 1'b1;
    end else begin
      sync1 <= rxd;
      sync2 <= sync1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!sync2) state <= S_START;
        end
        S_START: begin
          // wait half a bit, then confirm the start bit
          if (cnt == CW'((CLKS_PER_BIT - 1) / 2)) begin
            cnt  <= '0;
            bitn <= '0;
            state <= sync2 ? S_IDLE : S_DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {sync2, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= S_STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (sync2) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
