// bram_sdp: simple dual-port RAM (one write port, one registered read port),
// the shape of one FPGA block RAM. Used for each RAM block M0..M5 of a memory
// file. Contents are not reset; a read returns the word stored at the address
// presented on the previous clock edge (read-before-write on a same-address
// collision).
module bram_sdp #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 40
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
