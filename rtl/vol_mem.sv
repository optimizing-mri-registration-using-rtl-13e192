// vol_mem: one volume of voxel data, one write port and NRD read ports.
//
// Holds DEPTH words of WIDTH bits, addressed by the linear voxel index
// x + NX*(y + NY*z). Each read port is synchronous: the word at raddr[i]
// appears on rdata[i] after the next clock edge. A read of the address being
// written in the same cycle returns the old word. The accelerator uses one
// instance for the velocity field and two for the ping-pong deformation
// buffers; the number of read ports matches what a consumer reads per cycle
// (4 for the small deformation, 9 for composition, plus one host port). The
// organisation is this implementation's choice; an FPGA build would map it
// onto replicated or banked block/UltraRAM or external memory.
module vol_mem #(
  parameter int DEPTH = 121 * 145 * 121,
  parameter int WIDTH = 192,
  parameter int NRD   = 9,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr [NRD],
  output logic [WIDTH-1:0] rdata [NRD]
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar i = 0; i < NRD; i++) begin : g_rd
    always_ff @(posedge clk) rdata[i] <= mem[raddr[i]];
  end

endmodule
