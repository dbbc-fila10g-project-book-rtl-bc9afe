// plb_regs: the register block between the PowerPC and the user logic.
//
// A simple synchronous slave of 32-bit registers, standing where the
// processor bus attachment (PLB/OPB IP interface) delivers its decoded
// read and write strobes. Writes take effect on the clock edge with
// bus_wr high; a read returns data on bus_rdata one clock after bus_rd.
// Register set (addresses in fila10g_pkg): RTC base second, RTC current
// value, years since 2000, system configuration, system status, UDP/IP
// destination address and port, station ID, reference clock rate, and
// the VDIF channel/bit/thread fields, and two read-only monitors: frames
// sent and the second of the current frame.
// Writing the configuration register with bit CFG_ARM set produces a
// one-clock arm_pulse; the ARM bit itself is not stored (reads back 0).
// Read-only registers ignore writes; unknown addresses read 0.
// The register contents follow the design's PowerPC/user-logic interface
// list; addresses, bit positions and reset values are choices here.
// Reset values: test vector mode on, 1xVSI, Mark5B, reference rate
// REF_RATE_DEFAULT Hz, VDIF 16 channels of 2 bits, thread 0.
module plb_regs
  import fila10g_pkg::*;
#(
  parameter logic [31:0] REF_RATE_DEFAULT = 32'd150_000_000
) (
  input  logic        clk,
  input  logic        rst,
  // bus slave
  input  logic [3:0]  bus_addr,
  input  logic        bus_wr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_rd,
  output logic [31:0] bus_rdata,
  // to user logic
  output logic [31:0] rtc_base,
  output logic [7:0]  years,
  output logic [31:0] config_bits,
  output logic        arm_pulse,
  output logic [31:0] dest_ip,
  output logic [15:0] dest_port,
  output logic [15:0] station_id,
  output logic [31:0] ref_rate,
  output logic [19:0] vdif_cfg,
  // from user logic
  input  logic [31:0] rtc_now,
  input  logic [31:0] status_bits,
  input  logic [31:0] frames_sent,
  input  logic [31:0] frame_sec
);
  localparam logic [31:0] CONFIG_RESET = 32'(1) << CFG_TVG;

  always_ff @(posedge clk) begin
    if (rst) begin
      rtc_base    <= '0;
      years       <= '0;
      config_bits <= CONFIG_RESET;
      arm_pulse   <= 1'b0;
      dest_ip     <= '0;
      dest_port   <= '0;
      station_id  <= '0;
      ref_rate    <= REF_RATE_DEFAULT;
      vdif_cfg    <= VDIF_CFG_RESET;
      bus_rdata   <= '0;
    end else begin
      arm_pulse <= 1'b0;
      if (bus_wr) begin
        unique case (bus_addr)
          REG_RTC_BASE:  rtc_base   <= bus_wdata;
          REG_YEARS:     years      <= bus_wdata[7:0];
          REG_CONFIG: begin
            config_bits          <= bus_wdata;
            config_bits[CFG_ARM] <= 1'b0;
            arm_pulse            <= bus_wdata[CFG_ARM];
          end
          REG_DEST_IP:   dest_ip    <= bus_wdata;
          REG_DEST_PORT: dest_port  <= bus_wdata[15:0];
          REG_STATION:   station_id <= bus_wdata[15:0];
          REG_REF_RATE:  ref_rate   <= bus_wdata;
          REG_VDIF:      vdif_cfg   <= bus_wdata[19:0];
          default: ;
        endcase
      end
      if (bus_rd) begin
        unique case (bus_addr)
          REG_RTC_BASE:  bus_rdata <= rtc_base;
          REG_RTC_NOW:   bus_rdata <= rtc_now;
          REG_YEARS:     bus_rdata <= {24'd0, years};
          REG_CONFIG:    bus_rdata <= config_bits;
          REG_STATUS:    bus_rdata <= status_bits;
          REG_DEST_IP:   bus_rdata <= dest_ip;
          REG_DEST_PORT: bus_rdata <= {16'd0, dest_port};
          REG_STATION:   bus_rdata <= {16'd0, station_id};
          REG_REF_RATE:  bus_rdata <= ref_rate;
          REG_FRAMES:    bus_rdata <= frames_sent;
          REG_FRAME_SEC: bus_rdata <= frame_sec;
          REG_VDIF:      bus_rdata <= {12'd0, vdif_cfg};
          default:       bus_rdata <= '0;
        endcase
      end
    end
  end
endmodule
