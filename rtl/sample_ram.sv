// Step-response record: simple dual-port RAM, one write and one registered
// read port.
//
// Holds the process-variable change of every sampling instant of the step
// test, so that the 3 %, 28.3 % and 63.2 % crossings can be searched for
// once the final value is known. 'rdata' shows the word at 'raddr' one clock
// after the address is presented. Written as an array so that synthesis maps
// it to block RAM. Contents are not reset; only written words are read.
module sample_ram #(
  parameter int unsigned DW    = 10,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
