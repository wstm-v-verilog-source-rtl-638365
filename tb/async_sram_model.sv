// async_sram_model: behavioural model of the external asynchronous static RAM
// that the write sequencer fills (not synthesizable logic of the design).
// It has the write-side pins only: a write cycle lasts while chip enable,
// write enable and byte-high enable are all low, and the word on wdata is
// stored at addr when the cycle ends (the first of the three to rise).
// The stored contents can be read back through the rd_addr/rd_data port,
// which the testbench uses in place of the real read cycle.
module async_sram_model #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          xce,
  input  logic          xwe,
  input  logic          xbhe,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  output int unsigned   n_writes
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    n_writes = 0;
    foreach (mem[i]) mem[i] = '0;
  end

  logic writing;
  assign writing = !xce && !xwe && !xbhe;

  always @(negedge writing) begin
    mem[addr] = wdata;
    n_writes++;
  end

  assign rd_data = mem[rd_addr];
endmodule
