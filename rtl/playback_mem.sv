// playback_mem: dual-port playback memory of one input channel.
//
// VME fills the memory through a single data port: every write stores the
// word at the VME address pointer and advances the pointer.  A control bit
// (vme_ptr_reset) returns that pointer to 0.  The real-time port reads the
// memory at a second pointer that cycles through all DEPTH locations while
// playback mode is on; a TTC short broadcast (sync_reset) returns it to 0
// so that all channels of the module play back in step.
//
// Timing: rt_data is registered; it shows the word at pointer p one cycle
// after the pointer holds p.  DEPTH 256 and WIDTH 9 are the specification's.
module playback_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst,
  // VME port
  input  logic             vme_we,
  input  logic [WIDTH-1:0] vme_wdata,
  input  logic             vme_ptr_reset,
  // real-time port
  input  logic             enable,      // playback mode
  input  logic             sync_reset,  // TTC pointer alignment
  output logic [WIDTH-1:0] rt_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  always_ff @(posedge clk) begin
    if (rst || vme_ptr_reset) wptr <= '0;
    else if (vme_we)          wptr <= wptr + 1'b1;
    if (vme_we) mem[wptr] <= vme_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst || sync_reset) rptr <= '0;
    else if (enable)       rptr <= rptr + 1'b1;
    rt_data <= mem[rptr];
  end
endmodule
