// oci_tx_fifo: transmit network-interface FIFO of one router port.
//
// The processing element writes flits (destination port + payload) into the
// FIFO; the head flit is offered to the crossbar controller and removed when
// the controller grants it. Circular buffer of DEPTH entries with a
// valid/ready write side and a show-ahead read side (head visible whenever
// rd_valid is high, pop on rd_pop). A write and a pop may happen in the same
// cycle, also when full. Depth and handshake are this design's choices.
module oci_tx_fifo #(
  parameter int unsigned WIDTH = 12,   // flit width: destination + payload
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_pop
);

  localparam int unsigned AW = (DEPTH <= 1) ? 1 : $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign rd_valid = (count != '0);
  assign wr_ready = (count != (AW+1)'(DEPTH)) || rd_pop;
  assign do_rd    = rd_pop && rd_valid;
  assign do_wr    = wr_valid && wr_ready;
  assign rd_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] ptr);
    return (32'(ptr) == DEPTH - 1) ? '0 : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  // A pop is only issued for a flit that is there.
  assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid);

endmodule
