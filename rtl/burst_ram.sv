// burst_ram: simple dual-port RAM that buffers the received bursts.
//
// While the FFT and the spectral analysis work on one burst, the raw samples
// of that burst (and of the bursts arriving after it) wait here until the
// correction reads them back.  One write port and one read port, both on the
// same clock; the read data is registered (one cycle latency), as in a
// block RAM.  A read and a write of the same address in one cycle return the
// old content.  Contents are not reset.  The dual-port RAM follows the design
// description; its depth of three bursts is derived in the core (sync_core).
module burst_ram #(
  parameter int DEPTH = 1536,     // words
  parameter int DW    = 12        // word width
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
