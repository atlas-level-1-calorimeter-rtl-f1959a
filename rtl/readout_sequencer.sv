// readout_sequencer: local readout sequencer (R/S) of one processor FPGA.
//
// Slice data of every bunch tick enter a fixed-length latency pipeline of
// LATENCY ticks.  While the readout controller asserts read_req, the word at
// the end of the pipeline is written into a FIFO_DEPTH-deep derandomiser
// FIFO, one slice per cycle, with a flag marking the last slice of the event.
// Whenever the FIFO holds data, the serialiser takes one slice and shifts it
// out as N_STREAM parallel bit streams of SLICE_BITS bits each, most
// significant bit first, followed by one odd parity bit per stream.  The
// slices of one event follow each other without a gap, forming one packet;
// after the last slice the streams stay invalid for GAP ticks (separator).
//
// If TAG_W > 0, the low TAG_W bits of each slice carry a tag (the bunch
// crossing number): the tag seen on the first slice of an event (rr_first)
// is latched and written into every slice of that event.
//
// Timing: a slice requested in cycle t is in the FIFO at t+1, is loaded into
// the serialiser at t+2 and its first bit is on sout in cycle t+3 if the FIFO
// was empty.  One slice takes
// SLICE_BITS+1 cycles.  A write to a full FIFO is dropped and flagged.
// Following the specification: latency pipeline (~48 ticks), 256-deep FIFO,
// serialisation with appended odd parity, packets of 1-5 slices, 20-tick
// inter-packet gap.  The bit order is this design's choice.
module readout_sequencer #(
  parameter int unsigned N_STREAM   = 4,
  parameter int unsigned SLICE_BITS = 66,
  parameter int unsigned LATENCY    = 48,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned GAP        = 20,
  parameter int unsigned TAG_W      = 0
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [N_STREAM*SLICE_BITS-1:0] din,
  input  logic                           read_req,
  input  logic                           rr_first,
  input  logic                           rr_last,
  output logic [N_STREAM-1:0]            sout,
  output logic                           sout_valid,
  output logic [$clog2(FIFO_DEPTH):0]    fifo_count,
  output logic                           overflow
);
  localparam int unsigned DW  = N_STREAM * SLICE_BITS;
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned BCW = $clog2(SLICE_BITS + 1);
  localparam int unsigned GCW = $clog2(GAP + 2);

  // latency pipeline
  logic [DW-1:0] pipe [LATENCY];
  always_ff @(posedge clk) begin
    pipe[0] <= din;
    for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
  end

  // tag latching
  logic [DW-1:0] wdata;
  logic [(TAG_W > 0 ? TAG_W : 1)-1:0] tag_l;
  generate
    if (TAG_W > 0) begin : g_tag
      always_ff @(posedge clk) if (read_req && rr_first) tag_l <= pipe[LATENCY-1][TAG_W-1:0];
      assign wdata = rr_first ? pipe[LATENCY-1] : {pipe[LATENCY-1][DW-1:TAG_W], tag_l};
    end else begin : g_notag
      assign tag_l = 1'b0;
      assign wdata = pipe[LATENCY-1];
    end
  endgenerate

  // derandomiser FIFO
  logic [DW:0]    fifo [FIFO_DEPTH];
  logic [FAW-1:0] wp, rp;
  logic           do_read;
  logic           full;
  assign full = (fifo_count == (FAW+1)'(FIFO_DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; fifo_count <= '0; overflow <= 1'b0;
    end else begin
      if (read_req && !full) begin
        fifo[wp] <= {rr_last, wdata};
        wp <= wp + 1'b1;
      end
      if (read_req && full) overflow <= 1'b1;
      if (do_read) rp <= rp + 1'b1;
      fifo_count <= fifo_count + ((read_req && !full) ? 1'b1 : 1'b0) - (do_read ? 1'b1 : 1'b0);
    end
  end

  // serialiser
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_GAP} state_e;
  state_e              state;
  logic [DW-1:0]       cur;
  logic [N_STREAM-1:0] par;
  logic                last;
  logic [BCW-1:0]      bcnt;
  logic [GCW-1:0]      gcnt;
  logic                need;   // serialiser wants a new slice this cycle

  assign need    = (state == S_IDLE) || (state == S_SHIFT && bcnt == BCW'(SLICE_BITS) && !last);
  assign do_read = need && (fifo_count != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; sout <= '0; sout_valid <= 1'b0; bcnt <= '0; gcnt <= '0;
      last <= 1'b0; par <= '0; cur <= '0;
    end else begin
      // output of the current bit
      sout_valid <= 1'b0;
      sout       <= '0;
      if (state == S_SHIFT) begin
        sout_valid <= 1'b1;
        for (int s = 0; s < N_STREAM; s++)
          sout[s] <= (bcnt == BCW'(SLICE_BITS)) ? par[s] : cur[s*SLICE_BITS + SLICE_BITS - 1 - int'(bcnt)];
      end
      // next state
      if (do_read) begin
        {last, cur} <= fifo[rp];
        for (int s = 0; s < N_STREAM; s++)
          par[s] <= ~(^fifo[rp][s*SLICE_BITS +: SLICE_BITS]);
        bcnt  <= '0;
        state <= S_SHIFT;
      end else begin
        case (state)
          S_SHIFT: begin
            if (bcnt == BCW'(SLICE_BITS)) begin
              if (last) begin
                state <= (GAP > 1) ? S_GAP : S_IDLE;
                gcnt  <= GCW'(2);
              end else begin
                state <= S_IDLE;  // slice of the same event not yet there
              end
            end else begin
              bcnt <= bcnt + 1'b1;
            end
          end
          S_GAP: begin
            if (gcnt >= GCW'(GAP)) state <= S_IDLE;
            else                   gcnt <= gcnt + 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
