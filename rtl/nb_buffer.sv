// nb_buffer: the network-bound SRAM buffers.
//
// 64K words, organised as two banks of eight windows of 4K words each; a
// window holds one HIPPI packet's data and the sixteen windows cover the
// packets a sliding-window protocol may have unacknowledged in the network.
// In normal use the data port writes into one bank while the HIPPI source
// port reads from the other (BANKSELECT chooses which); the memory itself is
// a plain one-write, one-read array, and the processor's test path shares
// its two ports. Software picks the window of each bank and can re-send a packet
// from its window without copying it. Writes take effect at the clock edge;
// reads are asynchronous, like the fast static RAMs such a board uses.
module nb_buffer #(
  parameter int unsigned WINDOWS   = 8,
  parameter int unsigned WIN_WORDS = 4096
) (
  input  logic                         clk,
  // write port (data port side)
  input  logic                         wr_en_i,
  input  logic                         wr_bank_i,
  input  logic [$clog2(WINDOWS)-1:0]   wr_window_i,
  input  logic [$clog2(WIN_WORDS)-1:0] wr_addr_i,
  input  logic [31:0]                  wr_data_i,
  // read port (HIPPI source side)
  input  logic                         rd_bank_i,
  input  logic [$clog2(WINDOWS)-1:0]   rd_window_i,
  input  logic [$clog2(WIN_WORDS)-1:0] rd_addr_i,
  output logic [31:0]                  rd_data_o
);
  localparam int unsigned WW = $clog2(WINDOWS);
  localparam int unsigned AW = $clog2(WIN_WORDS);

  logic [31:0] mem [2*WINDOWS*WIN_WORDS];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[{wr_bank_i, wr_window_i, wr_addr_i}] <= wr_data_i;
  end

  assign rd_data_o = mem[{rd_bank_i, rd_window_i, rd_addr_i}];

  // widths used in the address concatenations
  if (WW + AW + 1 > 31) begin : g_size_check
    $error("nb_buffer: memory too large");
  end
endmodule
