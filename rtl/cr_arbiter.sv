// cr_arbiter: conflict resolution for one switch queue.
//
// Up to N packets at the fronts of neighbouring queues may head for the same
// queue in one network cycle, but only one may enter it. The arbiter picks one
// requester by a rotating priority whose starting point depends on the
// scheme: fixed priority (start at 0), round robin (start after the last
// winner) or random (start at a pseudo-random index from a 16-bit LFSR that
// steps every cycle). The pick depends only on the requests; the grant goes
// to the pick only if the queue can take a packet (ok). The three schemes are
// the ones the network study compares; the LFSR and the rotating-priority
// circuit are this design's own realisation of them.
//
// Interface: req[N] requests, ok = target has a vacancy this cycle,
// gnt[N] one-hot grant, sel = index of the pick, seed = LFSR reset value.
// Timing: combinational from req/ok to gnt; state (RR pointer, LFSR) updates
// at the clock edge.
module cr_arbiter
  import sfl_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter cr_scheme_e  SCHEME = CR_RAND
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          seed,
  input  logic [N-1:0]         req,
  input  logic                 ok,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] sel
);
  localparam int unsigned SW = $clog2(N);

  logic [15:0]   lfsr;
  logic [SW-1:0] rr_ptr;
  logic [SW-1:0] start;
  logic          found;

  always_comb begin
    unique case (SCHEME)
      CR_FP:   start = '0;
      CR_RR:   start = rr_ptr;
      default: start = SW'(lfsr % 16'(N));
    endcase
  end

  always_comb begin
    logic [SW-1:0] idx;
    sel   = start;
    found = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = SW'((int'(start) + i) % N);
      if (!found && req[idx]) begin
        found = 1'b1;
        sel   = idx;
      end
    end
    gnt = '0;
    if (found && ok) gnt[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr   <= seed | 16'h1;
      rr_ptr <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (found && ok) rr_ptr <= SW'((int'(sel) + 1) % N);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
