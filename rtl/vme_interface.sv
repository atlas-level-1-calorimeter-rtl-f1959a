// vme_interface: reduced VME (A24/D16) slave of the JEM.
//
// The backplane bus carries only A[23:1], D[15:0], DS0*, WRITE*, DTACK* and
// SYSRESET.  The module's base address comes from the six geographic address
// pins: the module owns the 256 KiB window whose A[23:18] equal GEOADD.  Any
// access inside that window is acknowledged with DTACK*, whether or not a
// register sits at the address, so that no access to the module can hang the
// bus.  Registers are 16-bit words at A[REG_AW:1]; addresses with A[17:12]
// non-zero are acknowledged but ignored (reads return 0).
//
// The control port runs on the bunch clock: DS0* is synchronised through two
// flip-flops; a falling edge starts a cycle that issues a one-tick read or
// write strobe on the local register bus, then drives DTACK* low (with read
// data on D) until DS0* goes high again.  Addresses and data are sampled when
// the strobe is issued; the VME protocol keeps them stable while DS0* is low.
//
// Timing: DTACK* falls 4 ticks after DS0* falls.  The window size and the
// handshake details are this design's choices; geographic addressing and
// unconditional DTACK follow the specification.
module vme_interface
  import jem_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [5:0]         geoadd,
  input  logic [23:1]        vme_a,
  input  logic [15:0]        vme_d_in,
  output logic [15:0]        vme_d_out,
  output logic               vme_d_oe,
  input  logic               vme_ds0_n,
  input  logic               vme_write_n,
  output logic               vme_dtack_n,
  // local register bus
  output logic [REG_AW-1:0]  bus_addr,
  output logic [15:0]        bus_wdata,
  output logic               bus_we,
  output logic               bus_re,
  input  logic [15:0]        bus_rdata
);
  typedef enum logic [1:0] {V_IDLE, V_STROBE, V_ACK} vstate_e;
  vstate_e    state;
  logic [1:0] ds_sync;
  logic       ds_prev;
  logic       sel, mapped, is_read;

  assign sel    = (vme_a[23:18] == geoadd);
  assign mapped = (vme_a[17:REG_AW+1] == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      ds_sync     <= 2'b11;
      ds_prev     <= 1'b1;
      state       <= V_IDLE;
      vme_dtack_n <= 1'b1;
      vme_d_oe    <= 1'b0;
      vme_d_out   <= '0;
      bus_we      <= 1'b0;
      bus_re      <= 1'b0;
      bus_addr    <= '0;
      bus_wdata   <= '0;
      is_read     <= 1'b0;
    end else begin
      ds_sync <= {ds_sync[0], vme_ds0_n};
      ds_prev <= ds_sync[1];
      bus_we  <= 1'b0;
      bus_re  <= 1'b0;
      case (state)
        V_IDLE: begin
          if (ds_prev && !ds_sync[1] && sel) begin
            bus_addr  <= vme_a[REG_AW:1];
            bus_wdata <= vme_d_in;
            bus_we    <= mapped && !vme_write_n;
            bus_re    <= mapped &&  vme_write_n;
            is_read   <= vme_write_n;
            state     <= V_STROBE;
          end
        end
        V_STROBE: begin
          vme_d_out   <= mapped ? bus_rdata : '0;
          vme_d_oe    <= is_read;
          vme_dtack_n <= 1'b0;
          state       <= V_ACK;
        end
        V_ACK: begin
          if (ds_sync[1]) begin
            vme_dtack_n <= 1'b1;
            vme_d_oe    <= 1'b0;
            state       <= V_IDLE;
          end
        end
        default: state <= V_IDLE;
      endcase
    end
  end
endmodule
