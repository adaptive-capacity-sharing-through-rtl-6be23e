// mem_interface: the L2's port to main memory.
//
// Takes one line request at a time from the L2 controller (req_valid with
// req_we, req_line, req_wdata; accepted while busy is low) and presents it on
// the memory side as a valid/ready request. A write (dirty victim) is posted:
// done pulses once memory accepts it. A read (line fill) waits for
// mem_resp_valid and then pulses done with the line in rdata. Requests carry
// line addresses; memory latency is whatever the memory takes.
//
// The document only names the memory interface; the handshake and the
// one-outstanding-request rule are this design's own choices. The assertion
// at the end samples rst_n in its disable clause, which Verilator reports as
// a reset used both synchronously and asynchronously.
module mem_interface #(
  parameter int unsigned LA_W   = 58,
  parameter int unsigned LINE_W = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // controller side
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [LA_W-1:0]   req_line,
  input  logic [LINE_W-1:0] req_wdata,
  output logic              busy,
  output logic              done,
  output logic [LINE_W-1:0] rdata,
  // memory side
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [LA_W-1:0]   mem_req_line,
  output logic [LINE_W-1:0] mem_req_wdata,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_data
);

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_WAIT} mstate_e;
  mstate_e state_q;

  assign busy          = state_q != M_IDLE;
  assign mem_req_valid = state_q == M_REQ;

  always_ff @(posedge clk) begin
    if (state_q == M_IDLE && req_valid) begin
      mem_req_we    <= req_we;
      mem_req_line  <= req_line;
      mem_req_wdata <= req_wdata;
    end
    if (state_q == M_WAIT && mem_resp_valid) rdata <= mem_resp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= M_IDLE;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        M_IDLE: if (req_valid) state_q <= M_REQ;
        M_REQ:  if (mem_req_ready) begin
                  if (mem_req_we) begin
                    state_q <= M_IDLE;
                    done    <= 1'b1;
                  end else begin
                    state_q <= M_WAIT;
                  end
                end
        M_WAIT: if (mem_resp_valid) begin
                  state_q <= M_IDLE;
                  done    <= 1'b1;
                end
        default: state_q <= M_IDLE;
      endcase
    end
  end

  // a response is only expected while a read waits for it
  assert property (@(posedge clk) disable iff (!rst_n) mem_resp_valid |-> state_q == M_WAIT);

endmodule
