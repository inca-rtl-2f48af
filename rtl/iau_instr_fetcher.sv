// iau_instr_fetcher: the Instr Fetcher of the IAU.  It reads the VI-ISA
// instruction sequence of the running task from DDR, starting at the Instr
// Addr the output control takes from the Status Pool, and sorts each
// instruction into the Virtual Instr FIFO (virtual flag set) or the Normal
// Instr FIFO, tagged with its instruction address.
//
// DDR read port: a request channel (valid/ready, one instruction word per
// request, addresses in instruction words) and an in-order response channel
// without back-pressure.  Several reads may be in flight (MAX_OUT); a request
// is only issued when the two FIFOs together are sure to have room for it.
// start (one cycle) flushes and restarts the fetch at start_addr; stop
// flushes and idles.  Responses to reads issued before a start/stop are
// counted and discarded.  Fetching ends when an END instruction arrives; it
// is passed on (normal FIFO) and later responses are discarded.
// The port protocol, the credit rule and END are this implementation's
// choices; the design states only that the fetcher reads from DDR according
// to Run State and Instr Addr.
module iau_instr_fetcher
  import inca_pkg::*;
#(
  parameter int unsigned DEPTH   = 8,   // depth of each FIFO
  parameter int unsigned MAX_OUT = 4    // reads in flight
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       stop,
  input  logic [IADDR_W-1:0]         start_addr,
  // DDR read
  output logic                       rd_req_valid,
  input  logic                       rd_req_ready,
  output logic [IADDR_W-1:0]         rd_req_addr,
  input  logic                       rd_resp_valid,
  input  vi_instr_t                  rd_resp_data,
  // FIFOs
  input  logic [$clog2(DEPTH+1)-1:0] cnt_norm,
  input  logic [$clog2(DEPTH+1)-1:0] cnt_virt,
  output logic                       push_norm,
  output logic                       push_virt,
  output fifo_entry_t                push_entry,
  output logic                       flush
);
  localparam int unsigned CW = $clog2(MAX_OUT + 1);

  logic               active_q, end_seen_q;
  logic [IADDR_W-1:0] req_addr_q, resp_addr_q;
  logic [CW-1:0]      inflight_q, drop_q;
  logic               req_fire, fresh;
  logic [CW-1:0]      inflight_n;
  int unsigned        room;

  assign flush = start || stop;

  // reads whose data will still be pushed, plus what the FIFOs already hold
  always_comb begin
    room = 32'(cnt_norm) + 32'(cnt_virt) + 32'(inflight_q) - 32'(drop_q);
  end

  assign rd_req_valid = active_q && !end_seen_q && !flush
                        && (inflight_q < CW'(MAX_OUT)) && (room < DEPTH);
  assign rd_req_addr  = req_addr_q;
  assign req_fire     = rd_req_valid && rd_req_ready;

  assign fresh      = rd_resp_valid && (drop_q == 0) && !end_seen_q && !flush;
  assign push_norm  = fresh && !rd_resp_data.virt;
  assign push_virt  = fresh && rd_resp_data.virt;
  assign push_entry = '{iaddr: resp_addr_q, instr: rd_resp_data};

  assign inflight_n = inflight_q + CW'(req_fire) - CW'(rd_resp_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q    <= 1'b0;
      end_seen_q  <= 1'b0;
      req_addr_q  <= '0;
      resp_addr_q <= '0;
      inflight_q  <= '0;
      drop_q      <= '0;
    end else begin
      inflight_q <= inflight_n;
      if (flush) begin
        active_q    <= start;
        end_seen_q  <= 1'b0;
        req_addr_q  <= start_addr;
        resp_addr_q <= start_addr;
        drop_q      <= inflight_n;  // everything still in flight is stale
      end else begin
        if (req_fire) req_addr_q <= req_addr_q + 1'b1;
        if (rd_resp_valid && drop_q != 0) drop_q <= drop_q - 1'b1;
        if (fresh) begin
          resp_addr_q <= resp_addr_q + 1'b1;
          if (rd_resp_data.op == VI_END) end_seen_q <= 1'b1;
        end
      end
    end
  end

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                    rd_resp_valid |-> inflight_q != 0);
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 rd_req_valid && !rd_req_ready && !flush |=> $stable(rd_req_addr));
endmodule
