// poly_mem: the memory file of one residue channel.
//
// Six RAM blocks M0..M5 of DEPTH = n/2 words (512 for n = 1024), each word a
// pair of 20-bit residue coefficients, one FPGA 36K block RAM per block, as
// the document describes. Two read ports (a and b) and one write port serve
// the controller: a coefficient-wise operation reads its two operands from
// two different blocks in the same cycle and writes the result into a third
// (or one of the two). Port a and port b must not address the same block in
// the same cycle (assertion). Reads are registered: data for the address given
// at one edge appears after the next edge. Which polynomial lives in which
// block is fixed by the recryption program, not by this module.
module poly_mem
  import fv_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_a_en,
  input  bank_t       rd_a_bank,
  input  logic [$clog2(DEPTH)-1:0] rd_a_addr,
  output word_t       rd_a_data,
  input  logic        rd_b_en,
  input  bank_t       rd_b_bank,
  input  logic [$clog2(DEPTH)-1:0] rd_b_addr,
  output word_t       rd_b_data,
  input  logic        wr_en,
  input  bank_t       wr_bank,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  word_t       wr_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t          rdata [NBANKS];
  logic [AW-1:0]  raddr [NBANKS];
  bank_t          a_bank_q, b_bank_q;

  for (genvar i = 0; i < NBANKS; i++) begin : g_bank
    assign raddr[i] = (rd_b_en && rd_b_bank == bank_t'(i)) ? rd_b_addr : rd_a_addr;
    bram_sdp #(.DEPTH(DEPTH), .WIDTH(2 * W)) u_ram (
      .clk(clk),
      .we(wr_en && wr_bank == bank_t'(i)),
      .waddr(wr_addr), .wdata(wr_data),
      .raddr(raddr[i]), .rdata(rdata[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_bank_q <= '0; b_bank_q <= '0;
    end else begin
      a_bank_q <= rd_a_bank; b_bank_q <= rd_b_bank;
    end
  end

  assign rd_a_data = (a_bank_q < bank_t'(NBANKS)) ? rdata[a_bank_q] : '0;
  assign rd_b_data = (b_bank_q < bank_t'(NBANKS)) ? rdata[b_bank_q] : '0;

  a_no_port_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_a_en && rd_b_en && rd_a_bank == rd_b_bank));

endmodule
