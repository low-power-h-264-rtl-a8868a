// sram_sp: single-port synchronous SRAM bank (one read or one write per
// clock). With en high, we selects a write of wdata to addr or a read whose
// data appears on rdata after the next rising edge. rdata holds its value
// while en is low. It stands for one compiled SRAM macro of the search-area
// memory; the document's memory banks are single-port with 8-bit words.
module sram_sp #(
  parameter int WORDS = 64,
  parameter int WIDTH = 8,
  localparam int AW = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
