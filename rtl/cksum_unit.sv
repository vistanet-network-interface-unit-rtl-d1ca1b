// cksum_unit: the NIU's checksum adder.
//
// Keeps two independent 16-bit one's-complement sums, one over the high half
// and one over the low half of each 32-bit word of the stream; the low sum
// never carries into the high one. Software later folds the two partial sums
// into a TCP-style checksum and removes the header part. One instance sums
// each arriving HIPPI packet (ring-bound), another each ring message entering
// the data port (network-bound).
//
// Interface: clear_i restarts both sums at zero; add_i adds data_i at the
// clock edge (clear_i together with add_i starts a new sum with that word).
// sum_o = {high sum, low sum} is valid the clock after the last add.
module cksum_unit
  import niu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear_i,
  input  logic        add_i,
  input  logic [31:0] data_i,
  output logic [31:0] sum_o
);
  logic [15:0] hi, lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi <= '0;
      lo <= '0;
    end else if (clear_i) begin
      hi <= add_i ? data_i[31:16] : '0;
      lo <= add_i ? data_i[15:0]  : '0;
    end else if (add_i) begin
      hi <= add1c(hi, data_i[31:16]);
      lo <= add1c(lo, data_i[15:0]);
    end
  end

  assign sum_o = {hi, lo};
endmodule
