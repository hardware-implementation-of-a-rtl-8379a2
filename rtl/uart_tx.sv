// uart_tx: RS-232 transmitter, 8 data bits, no parity, one stop bit.
//
// On `start` (while idle and enabled) the byte on `data` is latched and sent
// as a 0 start bit, eight data bits least significant first, and a 1 stop bit,
// each CLKS_PER_BIT clocks long; `busy` is high for the whole frame. While the
// transmit enable `en` is low no new frame begins (a frame already started is
// finished). The reset is the transmit reset. Requests while busy are ignored.
// The framing follows the original design; the enable behaviour is a choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 2622
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] data,
  input  logic       start,
  output logic       busy,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;   // {stop, data, start}, shifted out from bit 0
  logic [3:0]    left;    // bits still to send
  logic [CW-1:0] cnt;

  assign busy = (left != 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1;
      left  <= '0;
      cnt   <= '0;
      txd   <= 1'b1;
    end else if (left == 4'd0) begin
      txd <= 1'b1;
      if (start && en) begin
        frame <= {1'b1, data, 1'b0};
        left  <= 4'd10;
        cnt   <= '0;
        txd   <= 1'b0;          // start bit goes out at once
      end
    end else begin
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt   <= '0;
        frame <= {1'b1, frame[9:1]};
        left  <= left - 1'b1;
        txd   <= (left == 4'd1) ? 1'b1 : frame[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
