// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the network-bound header FIFO (processor writes header words, the
// HIPPI source port reads them ahead of the buffer window), and inside the
// ring-bound buffers and the command port. The head word is always visible
// on rdata_o while empty_o is low; pop_i removes it at the clock edge.
// A push while full and a pop while empty are ignored. clear_i empties the
// FIFO in one clock. The depth is a parameter; the header FIFO depth is this
// design's choice, as the specification gives none.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear_i,
  input  logic                       push_i,
  input  logic [WIDTH-1:0]           wdata_i,
  input  logic                       pop_i,
  output logic [WIDTH-1:0]           rdata_o,
  output logic                       empty_o,
  output logic                       full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  logic do_push, do_pop;
  assign do_push = push_i && (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_pop  = pop_i && (count != '0);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clear_i) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      if (do_push && !do_pop) count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !clear_i) mem[wr_ptr] <= wdata_i;
  end

  assign rdata_o = mem[rd_ptr];
  assign empty_o = (count == '0);
  assign full_o  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count_o = count;

endmodule
