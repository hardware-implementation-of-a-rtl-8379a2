// memory_interface: stores training samples and plays them back.
//
// During the first epoch each sample received from the host is written
// (`store`) at the next free RAM address and `count` grows. For later epochs
// the control unit pulses `rewind` to go back to the first sample and then
// `fetch` for each sample: `sample_valid` pulses one clock later with the
// sample on `sample_out`, and the read pointer advances. `at_end` is high
// when every stored sample has been fetched. When the RAM is `full`, further
// stores are ignored; the stored set is cleared only by reset. Both of those
// are choices of this design.
module memory_interface
  import nn_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       store,
  input  sample_t                    sample_in,
  input  logic                       rewind,
  input  logic                       fetch,
  output sample_t                    sample_out,
  output logic                       sample_valid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       at_end,
  output logic                       full
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CW-1:0] rd_ptr;
  logic          do_store, do_fetch;

  assign full     = (count == CW'(DEPTH));
  assign at_end   = (rd_ptr == count);
  assign do_store = store && !full;
  assign do_fetch = fetch && !at_end;

  training_ram #(.DEPTH(DEPTH), .WIDTH($bits(sample_t))) u_ram (
    .clk, .we(do_store), .waddr(count[AW-1:0]), .wdata(sample_in),
    .re(do_fetch), .raddr(rd_ptr[AW-1:0]), .rdata(sample_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      rd_ptr       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= do_fetch;
      if (do_store) count <= count + 1'b1;
      if (rewind)        rd_ptr <= '0;
      else if (do_fetch) rd_ptr <= rd_ptr + 1'b1;
    end
  end
endmodule
