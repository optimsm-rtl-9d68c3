// mem_if: memory interface of the accelerator. It reads the records from
// off-chip memory in bursts, streams them into the compute unit, writes each
// iteration result back, and steps through the iterations.
//
// The host leaves n_points records in memory from byte address rec_addr,
// packed back to back (REC_W bits each, see packet_conv). A pulse on start
// makes the interface run iterations 0 .. 2^LOG_I - 1. For each iteration it:
//   1. waits for the compute unit's core_ready, pulses core_start with
//      core_iter;
//   2. reads all ceil(n_points * REC_W / DATA_W) beats with AXI-style read
//      bursts of BURST beats (the last burst may be shorter) and passes the
//      R data to the unit as a stream; rready follows the unit's ready, so
//      no buffer is needed and any number of bursts may be outstanding;
//   3. takes the unit's result point and writes it, zero-extended to one
//      DATA_W beat, to res_addr + iter * DATA_W/8 with a single-beat write
//      burst, and waits for the write response.
// After the last iteration done pulses for one cycle; busy is high from start
// to done.
//
// Following the accelerator: 4096-bit data, bursts of 128 beats, the result
// written back after each iteration and the next iteration started once
// the interface knows the previous one is complete. This design's own
// choices: the address map (records from rec_addr, results one beat apart
// from res_addr) and the handshake with the host (start/busy/done). The bus
// follows the AXI4 valid/ready channels (AR, R, AW, W, B) with byte
// addresses and INCR bursts. A 4096-bit beat is wider than AXI4 allows, so
// the size and burst-type fields are left out. The 4 KB boundary rule is not
// honoured either, because a 128-beat burst of 512-byte beats is 64 KB.
// Read and write responses are not checked, and rlast is not used because
// the beat count already marks the end of every burst.
module mem_if
  import msm_pkg::*;
#(
  parameter int DATA_W = 4096,
  parameter int ADDR_W = 64,
  parameter int BURST  = 128,
  parameter int REC_W  = 5632,
  parameter int LOG_I  = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // host
  input  logic               start,
  input  logic [ADDR_W-1:0]  rec_addr,
  input  logic [ADDR_W-1:0]  res_addr,
  input  logic [31:0]        n_points,
  output logic               busy,
  output logic               done,
  // compute unit
  input  logic               core_ready,
  output logic               core_start,
  output logic [LOG_I-1:0]   core_iter,
  output logic [31:0]        core_n_points,
  output logic [DATA_W-1:0]  m_data,
  output logic               m_valid,
  input  logic               m_ready,
  input  logic               core_res_valid,
  output logic               core_res_ready,
  input  proj_t              core_res,
  // read address and data channels
  output logic               arvalid,
  input  logic               arready,
  output logic [ADDR_W-1:0]  araddr,
  output logic [7:0]         arlen,
  input  logic               rvalid,
  output logic               rready,
  input  logic [DATA_W-1:0]  rdata,
  // write address, data and response channels
  output logic               awvalid,
  input  logic               awready,
  output logic [ADDR_W-1:0]  awaddr,
  output logic [7:0]         awlen,
  output logic               wvalid,
  input  logic               wready,
  output logic [DATA_W-1:0]  wdata,
  output logic               wlast,
  input  logic               bvalid,
  output logic               bready
);
  localparam int BEAT_B = DATA_W / 8;

  typedef enum logic [2:0] {M_IDLE, M_WAIT, M_READ, M_RES, M_WRITE, M_RESP} mst_t;
  mst_t st;

  logic [LOG_I-1:0] it;
  logic [31:0]      n_beats;      // beats per iteration
  logic [31:0]      req_beats;    // beats requested so far
  logic [31:0]      got_beats;    // beats received so far
  logic [31:0]      left;
  logic [ADDR_W-1:0] rbase, wbase;
  logic             aw_done, w_done;

  // beats of the record area; computed once per run
  logic [63:0] bits_total;
  assign bits_total = 64'(n_points) * 64'(REC_W) + 64'(DATA_W - 1);

  assign left    = n_beats - req_beats;
  assign arvalid = (st == M_READ) && (req_beats != n_beats);
  assign araddr  = rbase + ADDR_W'(req_beats) * ADDR_W'(BEAT_B);
  assign arlen   = (left >= 32'(BURST)) ? 8'(BURST - 1) : 8'(left - 1);

  assign m_data  = rdata;
  assign m_valid = rvalid && (st == M_READ);
  assign rready  = m_ready && (st == M_READ);

  assign core_iter      = it;
  assign core_n_points  = n_points;
  assign core_res_ready = (st == M_RES);

  assign awvalid = (st == M_WRITE) && !aw_done;
  assign awaddr  = wbase + ADDR_W'(it) * ADDR_W'(BEAT_B);
  assign awlen   = 8'd0;
  assign wvalid  = (st == M_WRITE) && !w_done;
  assign wlast   = 1'b1;
  assign bready  = (st == M_RESP);
  assign busy    = (st != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= M_IDLE;
      it         <= '0;
      n_beats    <= '0;
      req_beats  <= '0;
      got_beats  <= '0;
      rbase      <= '0;
      wbase      <= '0;
      aw_done    <= 1'b0;
      w_done     <= 1'b0;
      core_start <= 1'b0;
      done       <= 1'b0;
      wdata      <= '0;
    end else begin
      core_start <= 1'b0;
      done       <= 1'b0;
      case (st)
        M_IDLE: if (start) begin
          rbase   <= rec_addr;
          wbase   <= res_addr;
          n_beats <= 32'(bits_total / 64'(DATA_W));
          it      <= '0;
          st      <= M_WAIT;
        end
        M_WAIT: if (core_ready && !core_start) begin
          core_start <= 1'b1;
          req_beats  <= '0;
          got_beats  <= '0;
          st         <= M_READ;
        end
        M_READ: begin
          if (arvalid && arready) req_beats <= req_beats + 32'(arlen) + 32'd1;
          if (rvalid && rready) got_beats <= got_beats + 32'd1;
          if (req_beats == n_beats &&
              (got_beats + 32'(rvalid && rready)) == n_beats) st <= M_RES;
        end
        M_RES: if (core_res_valid) begin
          wdata   <= DATA_W'(core_res);
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          st      <= M_WRITE;
        end
        M_WRITE: begin
          if (awvalid && awready) aw_done <= 1'b1;
          if (wvalid && wready)   w_done  <= 1'b1;
          if ((aw_done || awready) && (w_done || wready)) st <= M_RESP;
        end
        M_RESP: if (bvalid) begin
          if (it == LOG_I'((1 << LOG_I) - 1)) begin
            done <= 1'b1;
            st   <= M_IDLE;
          end else begin
            it <= it + 1'b1;
            st <= M_WAIT;
          end
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
