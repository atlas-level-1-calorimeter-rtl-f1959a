// sum_processor: energy sum processor FPGA of the JEM, with the module's
// DAQ read-out controller.
//
// Real-time path: the 40-bit energy pre-sums (Et 12, Ex 14, Ey 14 bits) of
// input processors R, S and T are latched in input flip-flops and added in
// three 3-input adders.  The two least significant bits of Ex and Ey
// (0.25 GeV) are dropped to give 1 GeV resolution.  Et saturates to 4095 on
// overflow or if any input Et is at full scale; Ex and Ey saturate to the
// 12-bit two's complement range.  Each of the three sums is compressed to
// 8 bits by the quad-linear code and the 24-bit word {Ey, Ex, Et} is sent
// with an odd parity bit (bit 24) through output flip-flops.  When the TTC is
// not ready the merger output is forced to zero.
//
// Readout: the jet hit word from the jet processor, the energy word and the
// bunch crossing number form one 66-bit DAQ slice {hits, esum, 4'b0, bcn},
// handled by a readout sequencer whose bunch number field is latched on the
// first slice of each event.  The read-out controller generates ReadRequest
// for all sequencers of the module and assembles the 16-bit DAQ link word:
// bits 0..14 are the input processor streams, bit 15 is this processor's.
// A spy memory captures the merger output word.
//
// Timing: esum_out is valid 4 ticks after the pre-sums arrive (input FF,
// adders, encoder, output FF).  The field order inside the 24-bit word and
// the DAQ slice layout are this design's choices.
module sum_processor
  import jem_pkg::*;
#(
  parameter int unsigned LATENCY    = 48,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned GAP        = 20,
  parameter int unsigned N_IP_STR   = 15
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [ET_W-1:0]         et_in [3],
  input  logic signed [EXY_W-1:0] ex_in [3],
  input  logic signed [EXY_W-1:0] ey_in [3],
  input  logic [MERGE_W-1:0]      jet_hits,
  output logic [MERGE_W-1:0]      esum_out,
  // TTC
  input  logic                    ttc_ready,
  input  logic                    l1a,
  input  logic                    bcnt_res,
  input  logic                    sync_reset,
  // readout
  input  logic [5:0]              ro_offset,
  input  logic [2:0]              ro_slices,
  output logic                    read_req,
  output logic                    rr_first,
  output logic                    rr_last,
  input  logic [N_IP_STR-1:0]     ip_stream,
  input  logic [N_IP_STR-1:0]     ip_stream_valid,
  output logic [N_IP_STR:0]       daq_link,
  output logic                    daq_dav,
  // spy
  input  logic                    spy_en,
  input  logic                    spy_rd,
  input  logic                    spy_ptr_reset,
  output logic [MERGE_W-1:0]      spy_rdata
);
  // input flip-flops
  logic [ET_W-1:0]         et_r [3];
  logic signed [EXY_W-1:0] ex_r [3];
  logic signed [EXY_W-1:0] ey_r [3];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      et_r[i] <= et_in[i];
      ex_r[i] <= ex_in[i];
      ey_r[i] <= ey_in[i];
    end
  end

  // adders, LSB cut, saturation
  logic [11:0] et_s, ex_s, ey_s;
  always_ff @(posedge clk) begin
    logic [ET_W+1:0]          et_a;
    logic signed [EXY_W+1:0]  ex_a, ey_a;
    logic signed [EXY_W-1:0]  ex_c, ey_c;
    et_a = (ET_W+2)'(et_r[0]) + (ET_W+2)'(et_r[1]) + (ET_W+2)'(et_r[2]);
    ex_a = (EXY_W+2)'(ex_r[0]) + (EXY_W+2)'(ex_r[1]) + (EXY_W+2)'(ex_r[2]);
    ey_a = (EXY_W+2)'(ey_r[0]) + (EXY_W+2)'(ey_r[1]) + (EXY_W+2)'(ey_r[2]);
    ex_c = EXY_W'(ex_a >>> 2);
    ey_c = EXY_W'(ey_a >>> 2);
    if (et_r[0] == '1 || et_r[1] == '1 || et_r[2] == '1 || et_a > (ET_W+2)'(4095))
      et_s <= 12'hFFF;
    else
      et_s <= et_a[11:0];
    ex_s <= ((ex_a >>> 2) > 16'sd2047) ? 12'h7FF : ((ex_a >>> 2) < -16'sd2048) ? 12'h800 : ex_c[11:0];
    ey_s <= ((ey_a >>> 2) > 16'sd2047) ? 12'h7FF : ((ey_a >>> 2) < -16'sd2048) ? 12'h800 : ey_c[11:0];
  end

  // quad-linear encoding
  logic [7:0] et_q, ex_q, ey_q;
  quadlin_encoder #(.SIGNED(1'b0)) u_qet (.din(et_s), .dout(et_q));
  quadlin_encoder #(.SIGNED(1'b1)) u_qex (.din(ex_s), .dout(ex_q));
  quadlin_encoder #(.SIGNED(1'b1)) u_qey (.din(ey_s), .dout(ey_q));

  logic [23:0] word;
  always_ff @(posedge clk) word <= {ey_q, ex_q, et_q};

  // output flip-flops with odd parity
  always_ff @(posedge clk) begin
    if (rst || !ttc_ready) esum_out <= '0;
    else                   esum_out <= {~(^word), word};
  end

  // DAQ read-out controller and this processor's readout sequencer
  logic [BCN_W-1:0] bcn;
  logic             s_bit, s_valid;
  logic [$clog2(FIFO_DEPTH):0] fcount;
  logic             fovf;

  readout_controller #(.N_IN(N_IP_STR + 1)) u_roc (
    .clk, .rst, .l1a, .bcnt_res, .ttc_ready,
    .offset(ro_offset), .n_slices(ro_slices),
    .read_req, .rr_first, .rr_last, .bcn,
    .stream({s_bit, ip_stream}), .stream_valid({s_valid, ip_stream_valid}),
    .link_data(daq_link), .link_dav(daq_dav)
  );

  readout_sequencer #(
    .N_STREAM(1), .SLICE_BITS(SLICE_W), .LATENCY(LATENCY),
    .FIFO_DEPTH(FIFO_DEPTH), .GAP(GAP), .TAG_W(BCN_W)
  ) u_rs (
    .clk, .rst,
    .din({jet_hits, esum_out, 4'b0000, bcn}),
    .read_req, .rr_first, .rr_last,
    .sout(s_bit), .sout_valid(s_valid), .fifo_count(fcount), .overflow(fovf)
  );

  spy_mem #(.DEPTH(256), .WIDTH(MERGE_W)) u_spy (
    .clk, .rst, .enable(spy_en), .sync_reset, .rt_data(esum_out),
    .vme_rd(spy_rd), .vme_ptr_reset(spy_ptr_reset), .vme_rdata(spy_rdata)
  );
endmodule
