// rs232_interface: serial link between the host and the control unit.
//
// Receive side: uart_rx bytes are collected in four byte registers; the
// first byte of a packet lands in bits [31:24] (the command byte) and the
// fourth in [7:0]. A complete 32-bit word is pushed into the receive FIFO
// (four words). While the FIFO is full a completed word waits in the
// registers, and bytes that arrive meanwhile are dropped; the host is told to
// stop through `rx_full`, which is the FIFO's full flag.
// Transmit side: 16-bit words from the transmit FIFO (six words) are sent as
// two bytes, high byte first, by uart_tx.
// FIFO sizes, the 4-byte packet and rx_full follow the original design; byte
// order and the overflow behaviour are choices of this implementation.
module rs232_interface #(
  parameter int unsigned CLKS_PER_BIT = 2622,
  parameter int unsigned RX_DEPTH     = 4,
  parameter int unsigned TX_DEPTH     = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        serial_in,
  output logic        serial_out,
  output logic        rx_full,
  // towards the control unit
  output logic        rx_empty,
  input  logic        rx_pop,
  output logic [31:0] rx_word,
  output logic        tx_full,
  input  logic        tx_push,
  input  logic [15:0] tx_word,
  // status
  output logic        frame_err
);
  // ---------------- receive ----------------
  logic [7:0]  rx_byte;
  logic        rx_valid;
  logic [31:0] pack;
  logic [1:0]  nbytes;
  logic        pending;
  logic        rxf_push;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(serial_in), .data(rx_byte), .valid(rx_valid), .frame_err
  );

  assign rxf_push = pending && !rx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack    <= '0;
      nbytes  <= '0;
      pending <= 1'b0;
    end else begin
      if (rxf_push) pending <= 1'b0;
      if (rx_valid && !pending) begin
        pack   <= {pack[23:0], rx_byte};
        nbytes <= nbytes + 1'b1;
        if (nbytes == 2'd3) pending <= 1'b1;
      end
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n, .push(rxf_push), .din(pack), .pop(rx_pop),
    .dout(rx_word), .empty(rx_empty), .full(rx_full), .count()
  );

  // ---------------- transmit ----------------
  logic [15:0] txq_word;
  logic        txq_empty;
  logic        txq_pop;
  logic        tx_busy, tx_start;
  logic [7:0]  tx_byte;
  logic        low_pending;   // high byte sent, low byte still to go
  logic [7:0]  low_byte;

  sync_fifo #(.WIDTH(16), .DEPTH(TX_DEPTH)) u_txq (
    .clk, .rst_n, .push(tx_push), .din(tx_word), .pop(txq_pop),
    .dout(txq_word), .empty(txq_empty), .full(tx_full), .count()
  );

  always_comb begin
    tx_start = 1'b0;
    txq_pop  = 1'b0;
    tx_byte  = low_byte;
    if (!tx_busy) begin
      if (low_pending) begin
        tx_start = 1'b1;
      end else if (!txq_empty) begin
        tx_start = 1'b1;
        txq_pop  = 1'b1;
        tx_byte  = txq_word[15:8];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_pending <= 1'b0;
      low_byte    <= '0;
    end else if (tx_start) begin
      low_pending <= txq_pop;
      if (txq_pop) low_byte <= txq_word[7:0];
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .en(1'b1), .data(tx_byte), .start(tx_start), .busy(tx_busy), .txd(serial_out)
  );
endmodule
