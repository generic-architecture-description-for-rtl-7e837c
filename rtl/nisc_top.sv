// nisc_top: the four designs of this repository, side by side.
//
//   ip_*  : simple_ip, a no-instruction-set (NISC) IP that runs a program of
//           precompiled control words on a 32-bit datapath (register file,
//           ALU, comparator, multiplexers) with an external data memory;
//   div_* : div_pipe, the 4-stage, 2-cycles-per-stage pipelined divider core;
//   mac_* : mac_datapath, the single-cycle ADD/MUL/MAC datapath with operand
//           gating;
//   dct_* : cdct_datapath, the four-stage pipelined NISC datapath for the
//           8x8 DCT (two matrix products), with a two-read-port data memory
//           outside.
// The four do not exchange data; they share only the clock and the
// synchronous, active-high reset. Each block's own header gives its timing.
module nisc_top (
  input  logic                                        clk,
  input  logic                                        reset,
  // simple NISC IP
  input  logic                                        ip_prog_we,
  input  logic [nisc_pkg::PC_W-1:0]                   ip_prog_addr,
  input  nisc_pkg::cw_t                               ip_prog_data,
  input  logic [nisc_pkg::DATA_W-1:0]                 ip_dm_r,
  output logic [nisc_pkg::DATA_W-1:0]                 ip_dm_addr,
  output logic [nisc_pkg::DATA_W-1:0]                 ip_dm_w,
  output logic                                        ip_dm_readEn,
  output logic                                        ip_dm_writeEn,
  output logic [nisc_pkg::PC_W-1:0]                   ip_pc,
  // pipelined divider
  input  logic                                        div_start,
  input  logic [31:0]                                 div_dividend,
  input  logic [31:0]                                 div_divisor,
  output logic [31:0]                                 div_quotient,
  output logic [31:0]                                 div_remainder,
  output logic                                        div_done,
  // ADD/MUL/MAC datapath
  input  logic [1:0]                                  mac_op,
  input  logic [31:0]                                 mac_a,
  input  logic [31:0]                                 mac_b,
  output logic [31:0]                                 mac_acc,
  // pipelined DCT datapath
  input  logic                                        dct_prog_we,
  input  logic [cdct_pkg::PC_W-1:0]                   dct_prog_addr,
  input  cdct_pkg::cdct_cw_t                          dct_prog_data,
  output logic [31:0]                                 dct_da_addr,
  input  logic [31:0]                                 dct_da_r,
  output logic [31:0]                                 dct_db_addr,
  input  logic [31:0]                                 dct_db_r,
  output logic [31:0]                                 dct_dw_addr,
  output logic [31:0]                                 dct_dw_data,
  output logic                                        dct_dw_en,
  output logic [cdct_pkg::PC_W-1:0]                   dct_pc
);
  simple_ip ip (
    .clk, .reset,
    .prog_we(ip_prog_we), .prog_addr(ip_prog_addr), .prog_data(ip_prog_data),
    .dm_r(ip_dm_r), .dm_addr(ip_dm_addr), .dm_w(ip_dm_w),
    .dm_readEn(ip_dm_readEn), .dm_writeEn(ip_dm_writeEn),
    .pc(ip_pc)
  );

  div_pipe #(.W(32), .STAGES(4)) divider (
    .clk, .reset,
    .start(div_start), .dividend(div_dividend), .divisor(div_divisor),
    .quotient(div_quotient), .remainder(div_remainder), .done(div_done)
  );

  mac_datapath #(.W(32), .GATING(1'b1)) mac (
    .clk, .reset,
    .op(mac_op), .a(mac_a), .b(mac_b), .acc(mac_acc)
  );

  cdct_datapath dct (
    .clk, .reset,
    .prog_we(dct_prog_we), .prog_addr(dct_prog_addr), .prog_data(dct_prog_data),
    .da_addr(dct_da_addr), .da_r(dct_da_r), .db_addr(dct_db_addr), .db_r(dct_db_r),
    .dw_addr(dct_dw_addr), .dw_data(dct_dw_data), .dw_en(dct_dw_en),
    .pc(dct_pc)
  );
endmodule
