// Memory controller of one node. Two buffers feed it: the cache-memory
// buffer (processor accesses to the local memory and the write phase of a
// block transfer) and the interface-memory buffer (requests that arrived
// from other nodes over the ring). When both hold a request they are served
// in round-robin order, so a block write to this node's memory and a
// request from another node share the memory bandwidth.
//
// Each access occupies the memory for MEM_CYCLES cycles: the request is
// popped from its buffer in the grant cycle t, the array is accessed in
// cycle t+MEM_CYCLES-1 and the response (read data, or completion of a
// write) is flagged on the port it came from in cycle t+MEM_CYCLES, when the
// next grant can also be made. Responses cannot be refused.
// The round-robin service is from the source design; the access time, the
// fixed-latency timing and the write completion signal are this design's
// choices (MEM_CYCLES must be at least 2).
module bt_mem_ctrl
  import bt_pkg::*;
#(
  parameter int unsigned MEM_WORDS  = 16384,
  parameter int unsigned MEM_CYCLES = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  // cache-memory buffer (port 0)
  input  logic     cm_valid,
  input  mem_req_t cm_req,
  output logic     cm_pop,
  // interface-memory buffer (port 1)
  input  logic     im_valid,
  input  mem_req_t im_req,
  output logic     im_pop,
  // responses
  output logic     cm_resp_valid,
  output logic     im_resp_valid,
  output logic     resp_we,
  output word_t    resp_rdata
);
  localparam int unsigned CNTW = $clog2(MEM_CYCLES + 1);

  logic            busy;
  logic [CNTW-1:0] cnt;
  logic            cur_port;   // port being served
  logic            last_port;  // port granted last, for round robin
  mem_req_t        cur;
  logic            grant_cm, grant_im, access;

  // Round robin: with both ports waiting, serve the one not granted last.
  always_comb begin
    grant_cm = 1'b0;
    grant_im = 1'b0;
    if (!busy) begin
      if (cm_valid && im_valid) begin
        grant_cm = last_port;
        grant_im = !last_port;
      end else begin
        grant_cm = cm_valid;
        grant_im = im_valid;
      end
    end
  end
  assign cm_pop = grant_cm;
  assign im_pop = grant_im;
  assign access = busy && (cnt == CNTW'(1));

  bt_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk   (clk),
    .en    (access),
    .we    (cur.we),
    .addr  (cur.addr),
    .wdata (cur.wdata),
    .rdata (resp_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      cnt           <= '0;
      cur_port      <= 1'b0;
      last_port     <= 1'b1;
      cur           <= '0;
      cm_resp_valid <= 1'b0;
      im_resp_valid <= 1'b0;
      resp_we       <= 1'b0;
    end else begin
      cm_resp_valid <= access && !cur_port;
      im_resp_valid <= access && cur_port;
      if (access) resp_we <= cur.we;
      if (grant_cm || grant_im) begin
        busy      <= 1'b1;
        cnt       <= CNTW'(MEM_CYCLES - 1);
        cur_port  <= grant_im;
        last_port <= grant_im;
        cur       <= grant_im ? im_req : cm_req;
      end else if (busy) begin
        cnt <= cnt - 1'b1;
        if (cnt == CNTW'(1)) busy <= 1'b0;
      end
    end
  end

  a_min_cycles: assert property (@(posedge clk) MEM_CYCLES >= 2);
endmodule
