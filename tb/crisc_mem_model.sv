// crisc_mem_model: behavioural model of the memory on the C-RISC buses, for
// simulation only. 256 bytes, one address for instructions and data. A read
// is answered combinationally within the cycle; a write is taken at the
// rising clock edge when we is high. The testbench fills mem[] directly.
module crisc_mem_model (
  input  logic       clk,
  input  logic [7:0] addr,
  output logic [7:0] rdata,
  input  logic [7:0] wdata,
  input  logic       we
);
  logic [7:0] mem [256];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
endmodule
