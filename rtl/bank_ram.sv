// bank_ram: one storage bank, a simple dual-port RAM (one write port, one
// read port) of DEPTH words of W bits. Synchronous write; synchronous read
// with one cycle of latency (read data of the old contents if the same
// address is written in the same cycle). Written as an array so that
// synthesis maps it to an SRAM macro or to register-file memory.
module bank_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 22
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
