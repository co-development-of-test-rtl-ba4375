// ctrl_regs: the register file behind the board's USB control link.
//
// A simple synchronous bus: `bus_we` writes `bus_wdata` at byte address
// `bus_addr` on the clock edge; `bus_rdata` is combinational from
// `bus_addr`. Map (byte addresses, 32-bit registers):
//   0x000 CTRL       [0] tx_enable [2:1] src_mode [3] inline_fill
//                    [4] selftest_en [6:5] manip_mode [10:8] win_advance
//   0x004 ROUTE_CFG  [7:0] synth_route [11:8] pattern_sel [20:16] route_sym
//   0x008 MANIP_EVERY[7:0]
//   0x00C MANIP_MASK
//   0x010 CMD        write 1 to pulse: [0] selftest_clear [1] prbs_reseed
//   0x040..0x070     status counters, read only, in status_t order from
//                    pcie_rx_pkts (0x040) to st_lost (0x070)
//   0x100..0x13C     route table entry n at 0x100 + 4n, write only
//   0x200..0x3FC     stored pattern p, word w at 0x200 + 32p + 4w, write only
//   0x400..0x46C     delay code n (10 bits, 10 ps steps) at 0x400 + 4n
//   0x800..0x8FC     received-packet monitor, packet p, word w at
//                    0x800 + 32p + 4w, read only
// Delay codes 0..17 are the outgoing signals (payload 0-7, clock, frame,
// routing 0-7), 18..27 the incoming ones (payload 0-7, clock, frame).
// Everything resets to zero (ROUTE_CFG route_sym to 11). The document
// says the features are controlled over USB; the map is this design's.
`timescale 1ps / 1ps
module ctrl_regs
  import ops_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              bus_we,
  input  logic [11:0]                       bus_addr,
  input  logic [31:0]                       bus_wdata,
  output logic [31:0]                       bus_rdata,
  output cfg_t                              cfg,
  input  status_t                           status,
  output logic [N_DELAY-1:0][DELAY_W-1:0]   delay_code,
  output logic                              tbl_we,
  output logic [3:0]                        tbl_addr,
  output logic [ROUTE_BITS-1:0]             tbl_data,
  output logic                              pat_we,
  output logic [6:0]                        pat_addr,
  output logic [31:0]                       pat_data,
  output logic [5:0]                        mon_addr,
  input  logic [31:0]                       mon_data
);

  logic [31:0] stat_words [13];

  always_comb begin
    stat_words[0]  = 32'(status.pcie_rx_pkts);
    stat_words[1]  = 32'(status.pcie_rx_bad);
    stat_words[2]  = 32'(status.fifo_overflow);
    stat_words[3]  = 32'(status.slots_sent);
    stat_words[4]  = 32'(status.net_rx_pkts);
    stat_words[5]  = 32'(status.manip_corrupted);
    stat_words[6]  = 32'(status.manip_dropped);
    stat_words[7]  = 32'(status.st_pkts);
    stat_words[8]  = 32'(status.st_pkt_errors);
    stat_words[9]  = status.st_bit_errors;
    stat_words[10] = 32'(status.st_missing);
    stat_words[11] = 32'(status.pcie_tx_lost);
    stat_words[12] = 32'(status.st_lost);
  end

  // Write strobes to the memories outside this block.
  assign tbl_we   = bus_we && (bus_addr[11:6] == 6'b0001_00);
  assign tbl_addr = bus_addr[5:2];
  assign tbl_data = bus_wdata[ROUTE_BITS-1:0];
  assign pat_we   = bus_we && (bus_addr[11:9] == 3'b001);
  assign pat_addr = bus_addr[8:2];
  assign pat_data = bus_wdata;
  assign mon_addr = bus_addr[7:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg           <= '0;
      cfg.route_sym <= 5'd11;
      delay_code    <= '0;
    end else begin
      cfg.selftest_clear <= 1'b0;
      cfg.prbs_reseed    <= 1'b0;
      if (bus_we) begin
        unique casez (bus_addr)
          12'h000: begin
            cfg.tx_enable   <= bus_wdata[0];
            cfg.src_mode    <= src_mode_e'(bus_wdata[2:1]);
            cfg.inline_fill <= bus_wdata[3];
            cfg.selftest_en <= bus_wdata[4];
            cfg.manip_mode  <= manip_mode_e'(bus_wdata[6:5]);
            cfg.win_advance <= bus_wdata[10:8];
          end
          12'h004: begin
            cfg.synth_route <= bus_wdata[7:0];
            cfg.pattern_sel <= bus_wdata[11:8];
            cfg.route_sym   <= bus_wdata[20:16];
          end
          12'h008: cfg.manip_every <= bus_wdata[7:0];
          12'h00C: cfg.manip_mask  <= bus_wdata;
          12'h010: begin
            cfg.selftest_clear <= bus_wdata[0];
            cfg.prbs_reseed    <= bus_wdata[1];
          end
          12'b0100_0???_??00: begin
            if (bus_addr[6:2] < 5'(N_DELAY))
              delay_code[bus_addr[6:2]] <= bus_wdata[DELAY_W-1:0];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata = '0;
    unique casez (bus_addr)
      12'h000: bus_rdata = {21'd0, cfg.win_advance, 1'b0, cfg.manip_mode, cfg.selftest_en,
                            cfg.inline_fill, cfg.src_mode, cfg.tx_enable};
      12'h004: bus_rdata = {11'd0, cfg.route_sym, 4'd0, cfg.pattern_sel,
                            cfg.synth_route};
      12'h008: bus_rdata = {24'd0, cfg.manip_every};
      12'h00C: bus_rdata = cfg.manip_mask;
      12'b0000_01??_??00: begin
        if (bus_addr[5:2] <= 4'd12) bus_rdata = stat_words[bus_addr[5:2]];
      end
      12'b0100_0???_??00: begin
        if (bus_addr[6:2] < 5'(N_DELAY))
          bus_rdata = 32'(delay_code[bus_addr[6:2]]);
      end
      12'b1000_????_??00: bus_rdata = mon_data;
      default: ;
    endcase
  end

endmodule
