// sync_buffer: the synchronization buffer ("SYB") of a decoupled DIMM.
//
// It sits between the fast DDRx channel and the on-DIMM rank bus of slower DRAM devices and
// makes the devices look, to the memory controller, as if they ran at the channel's data
// rate. Following the document's block diagram it is built from:
//   A syb_bus_data_if  - data interface with the channel
//   B syb_bus_ctrl_if  - channel command/address (control) interface
//   C DLL              - not modelled; the bus clock is taken as skew free
//   D syb_dev_ctrl_if  - command/address interface with the devices
//   E syb_dev_data_if  - data interface with the devices
//   F syb_data_buffer  - one 64-byte read entry and one 64-byte write entry
//   G syb_cmd_buffer   - one 32-bit command/address entry
// plus syb_clk_div, the 1:M shift-register divider that makes the device clock from the
// bus clock.
// Everything runs on the bus clock `clk`; the device side changes state only at device
// clock edges, so it is synchronous to dev_clk without a clock-domain crossing.
// Latencies (bus clocks, command in device phase 0, M = bus rate / device rate):
//   command: reaches the devices M bus clocks (one device clock) later
//   read data: first chunk on the channel CL*M + 5M - 4 bus clocks after the device READ;
//     the last outgoing chunk ends one device clock after the last incoming chunk
//   write data: expected on the channel CWL*M - 2 bus clocks after the device WRITE
// The data pins are split into in/out/output-enable; a wrapper adds the tri-states.
module sync_buffer
  import ddr_pkg::*;
#(
  parameter int M      = 2,   // bus data rate / device data rate (1:2 by default)
  parameter int N_RANK = 2,   // ranks on this DIMM's rank bus
  parameter int CL     = 8,   // device read latency, device clocks (DDR3-1066 8-8-8)
  parameter int CWL    = 6    // device write latency, device clocks
) (
  input  logic              clk,
  input  logic              rst_n,
  // channel side
  input  ddr_ca_t           bus_ca,
  input  logic [N_RANK-1:0] bus_cs_n,
  input  logic [N_RANK-1:0] bus_cke,
  input  logic [N_RANK-1:0] bus_odt,
  input  chunk_t            bus_dq_in,
  output chunk_t            bus_dq_out,
  output logic              bus_dq_oe,
  // device (rank bus) side
  output logic              dev_clk,
  output ddr_ca_t           dev_ca,
  output logic [N_RANK-1:0] dev_cs_n,
  output logic [N_RANK-1:0] dev_cke,
  output logic [N_RANK-1:0] dev_odt,
  input  chunk_t            dev_dq_in,
  output chunk_t            dev_dq_out,
  output logic              dev_dq_oe,
  // status
  output logic              cmd_overflow
);
  logic                dev_tick;
  logic [$clog2(M+1)-1:0] dev_phase;

  logic                ent_we, ent_re, ent_valid;
  syb_cmd_entry_t      ent_wdata, ent;
  logic [N_RANK-1:0]   cke_lvl, odt_lvl;
  logic                rd_evt, wr_evt;

  logic                rdb_we;
  logic [1:0]          rdb_widx, rdb_ridx, wrb_widx, wrb_ridx;
  chunk_t              rdb_wdata, rdb_rdata, wrb_wdata, wrb_rdata;
  logic                wrb_we;

  syb_clk_div #(.M(M)) u_div (
    .clk, .rst_n, .dev_clk, .dev_tick, .dev_phase
  );

  syb_bus_ctrl_if #(.N_RANK(N_RANK)) u_bus_ctrl (
    .clk, .rst_n, .bus_ca, .bus_cs_n, .bus_cke, .bus_odt,
    .ent_we, .ent_wdata, .cke_lvl, .odt_lvl
  );

  syb_cmd_buffer u_cmd_buf (
    .clk, .rst_n, .we(ent_we), .wdata(ent_wdata), .re(ent_re),
    .valid(ent_valid), .rdata(ent), .overflow(cmd_overflow)
  );

  syb_dev_ctrl_if #(.N_RANK(N_RANK)) u_dev_ctrl (
    .clk, .rst_n, .dev_tick, .ent_valid, .ent, .ent_re, .cke_lvl, .odt_lvl,
    .dev_ca, .dev_cs_n, .dev_cke, .dev_odt, .rd_evt, .wr_evt
  );

  syb_data_buffer u_data_buf (
    .clk,
    .rd_we(rdb_we), .rd_widx(rdb_widx), .rd_wdata(rdb_wdata), .rd_ridx(rdb_ridx), .rd_rdata(rdb_rdata),
    .wr_we(wrb_we), .wr_widx(wrb_widx), .wr_wdata(wrb_wdata), .wr_ridx(wrb_ridx), .wr_rdata(wrb_rdata)
  );

  syb_dev_data_if #(.M(M), .CL(CL), .CWL(CWL)) u_dev_data (
    .clk, .rst_n, .rd_evt, .wr_evt, .dq_in(dev_dq_in), .dq_out(dev_dq_out), .dq_oe(dev_dq_oe),
    .rdbuf_we(rdb_we), .rdbuf_idx(rdb_widx), .rdbuf_wdata(rdb_wdata),
    .wrbuf_idx(wrb_ridx), .wrbuf_rdata(wrb_rdata)
  );

  syb_bus_data_if #(.M(M), .CL(CL), .CWL(CWL)) u_bus_data (
    .clk, .rst_n, .rd_evt, .wr_evt, .bus_dq_in, .bus_dq_out, .bus_dq_oe,
    .wrbuf_we(wrb_we), .wrbuf_idx(wrb_widx), .wrbuf_wdata(wrb_wdata),
    .rdbuf_idx(rdb_ridx), .rdbuf_rdata(rdb_rdata)
  );

endmodule
