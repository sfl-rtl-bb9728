// sfl_top: the three packet-switched banyan networks of the design space,
// side by side.
//
// All three connect N = F**(L+1) processors through a rectangular (F,F,L)
// CC-banyan of synchronous F x F switches with FIFO buffers, one hop per
// network cycle, grants rippling back through the network within the cycle:
//   des_*  double-ended simplex: processors on one side, memories on the
//          other, L+1 stages;
//   sefd_* single-ended full duplex: processors below the base level,
//          packets climb to the lowest level that can turn them, are
//          reflected and descend; separate up and down lines and queues;
//   sehd_* single-ended half duplex: as SEFD but one shared line per port
//          and one deadlock-avoiding queue unit per top port.
// Each network keeps its own ports; they share only clock, reset and the
// parameters. The single-ended full-duplex network is the one recommended
// for a multiprocessor; the other two are the cheaper (SEHD) and the
// conventional (DES) alternatives of the same study.
//
// Defaults: (2,2,7), i.e. 256 processors and 8 switch levels, buffer size 16,
// random conflict resolution.
module sfl_top
  import sfl_pkg::*;
#(
  parameter int unsigned F_LOG    = 1,
  parameter int unsigned L        = 7,
  parameter int unsigned DEPTH    = 16,
  parameter cr_scheme_e  SCHEME   = CR_RAND,
  parameter int unsigned PQ_DEPTH = 64,
  parameter int unsigned MQ_DEPTH = 4,
  localparam int unsigned N = 1 << (F_LOG * (L + 1))
) (
  input  logic              clk,
  input  logic              rst_n,
  // DES network: processors and memories
  input  logic              des_gen_valid [N],
  input  logic [ID_W-1:0]   des_gen_dest  [N],
  input  logic [DATA_W-1:0] des_gen_data  [N],
  output logic              des_gen_ready [N],
  output logic              des_mem_valid [N],
  output packet_t           des_mem_pkt   [N],
  input  logic              des_mem_ready [N],
  output logic [L:0]        des_st_conflict,
  output logic [L:0]        des_st_blocked,
  // SEFD network: processors, send and receive sides
  input  logic              sefd_gen_valid [N],
  input  logic [ID_W-1:0]   sefd_gen_dest  [N],
  input  logic [DATA_W-1:0] sefd_gen_data  [N],
  output logic              sefd_gen_ready [N],
  output logic              sefd_rcv_valid [N],
  output packet_t           sefd_rcv_pkt   [N],
  input  logic              sefd_rcv_ready [N],
  output logic [L:0]        sefd_lv_conflict,
  output logic [L:0]        sefd_lv_blocked,
  output logic [L:0]        sefd_lv_reflect,
  // SEHD network: processors, send and receive sides
  input  logic              sehd_gen_valid [N],
  input  logic [ID_W-1:0]   sehd_gen_dest  [N],
  input  logic [DATA_W-1:0] sehd_gen_data  [N],
  output logic              sehd_gen_ready [N],
  output logic              sehd_rcv_valid [N],
  output packet_t           sehd_rcv_pkt   [N],
  input  logic              sehd_rcv_ready [N],
  output logic [L:0]        sehd_lv_conflict,
  output logic [L:0]        sehd_lv_blocked,
  output logic [L:0]        sehd_lv_reflect,
  output logic [L:0]        sehd_lv_reserve,
  output logic [L:0]        sehd_lv_line_busy
);

  des_network #(.F_LOG(F_LOG), .L(L), .DEPTH(DEPTH), .SCHEME(SCHEME),
                .PQ_DEPTH(PQ_DEPTH), .MQ_DEPTH(MQ_DEPTH)) u_des (
    .clk, .rst_n,
    .gen_valid   (des_gen_valid),
    .gen_dest    (des_gen_dest),
    .gen_data    (des_gen_data),
    .gen_ready   (des_gen_ready),
    .mem_valid   (des_mem_valid),
    .mem_pkt     (des_mem_pkt),
    .mem_ready   (des_mem_ready),
    .st_conflict (des_st_conflict),
    .st_blocked  (des_st_blocked)
  );

  sefd_network #(.F_LOG(F_LOG), .L(L), .DEPTH(DEPTH), .SCHEME(SCHEME),
                 .PQ_DEPTH(PQ_DEPTH), .MQ_DEPTH(MQ_DEPTH)) u_sefd (
    .clk, .rst_n,
    .gen_valid   (sefd_gen_valid),
    .gen_dest    (sefd_gen_dest),
    .gen_data    (sefd_gen_data),
    .gen_ready   (sefd_gen_ready),
    .rcv_valid   (sefd_rcv_valid),
    .rcv_pkt     (sefd_rcv_pkt),
    .rcv_ready   (sefd_rcv_ready),
    .lv_conflict (sefd_lv_conflict),
    .lv_blocked  (sefd_lv_blocked),
    .lv_reflect  (sefd_lv_reflect)
  );

  sehd_network #(.F_LOG(F_LOG), .L(L), .DEPTH(DEPTH), .SCHEME(SCHEME),
                 .PQ_DEPTH(PQ_DEPTH), .MQ_DEPTH(MQ_DEPTH)) u_sehd (
    .clk, .rst_n,
    .gen_valid    (sehd_gen_valid),
    .gen_dest     (sehd_gen_dest),
    .gen_data     (sehd_gen_data),
    .gen_ready    (sehd_gen_ready),
    .rcv_valid    (sehd_rcv_valid),
    .rcv_pkt      (sehd_rcv_pkt),
    .rcv_ready    (sehd_rcv_ready),
    .lv_conflict  (sehd_lv_conflict),
    .lv_blocked   (sehd_lv_blocked),
    .lv_reflect   (sehd_lv_reflect),
    .lv_reserve   (sehd_lv_reserve),
    .lv_line_busy (sehd_lv_line_busy)
  );

endmodule
