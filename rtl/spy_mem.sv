// spy_mem: dual-port spy memory.
//
// While spy mode is on, the real-time port writes the data word of every
// bunch tick at a write pointer that cycles through DEPTH locations; a TTC
// short broadcast (sync_reset) returns it to 0 so that all spy memories of
// the module are aligned.  VME reads the memory through a single data port:
// vme_rdata shows the word at the VME pointer, and each vme_rd strobe
// advances the pointer.  vme_ptr_reset returns the VME pointer to 0.
//
// Timing: vme_rdata is combinational from the VME pointer (the memory is
// small; in an FPGA it maps to distributed or block RAM with the pointer
// registered).  DEPTH 256 is the specification's; WIDTH is 10 per input
// channel and 25 in the sum and jet processors.
module spy_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 25
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,      // spy mode
  input  logic             sync_reset,
  input  logic [WIDTH-1:0] rt_data,
  input  logic             vme_rd,
  input  logic             vme_ptr_reset,
  output logic [WIDTH-1:0] vme_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  always_ff @(posedge clk) begin
    if (rst || sync_reset) wptr <= '0;
    else if (enable)       wptr <= wptr + 1'b1;
    if (enable) mem[wptr] <= rt_data;
  end

  always_ff @(posedge clk) begin
    if (rst || vme_ptr_reset) rptr <= '0;
    else if (vme_rd)          rptr <= rptr + 1'b1;
  end

  assign vme_rdata = mem[rptr];
endmodule
