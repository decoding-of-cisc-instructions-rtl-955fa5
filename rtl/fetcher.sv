// fetcher: instruction queue between the I-cache/predecoder and the decoder.
//
// Predecoded instructions arrive up to FETCH_W per cycle (in_count of them,
// taken from in_instr[0..]). They are accepted when the queue has room for a
// full group (in_ready). Each cycle the oldest FETCH_W queued instructions are
// offered to the decoder as a window. The window ends after the first branch
// predicted taken. So instructions that follow a taken branch reach the
// decoder only in a later cycle, which is the fetch rule of the document. The
// decoder answers with `take`, the number of window instructions it consumed.
// These leave the queue at the clock edge.
//
// The window width of 5 is the document's fetch rate. The queue depth, the
// all-or-nothing input handshake and the prediction bit carried with each
// instruction are this design's choices. The document assumes perfect branch
// prediction, so the incoming stream already follows the predicted path.
module fetcher
  import cisc_pkg::*;
#(
  parameter int FETCH_W  = 5,
  parameter int IQ_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  x86_instr_t [FETCH_W-1:0]  in_instr,
  input  logic [$clog2(FETCH_W+1)-1:0] in_count,
  output logic                      in_ready,
  output x86_instr_t [FETCH_W-1:0]  win,
  output logic       [FETCH_W-1:0]  win_valid,
  input  logic       [2:0]          take,
  output logic                      taken_cut   // window shortened by a taken branch
);

  localparam int PW = $clog2(IQ_DEPTH);
  localparam int CW = $clog2(IQ_DEPTH + 1);

  x86_instr_t     q [IQ_DEPTH];
  logic [PW-1:0]  head, tail;
  logic [CW-1:0]  count;

  assign in_ready = (int'(count) + FETCH_W <= IQ_DEPTH);

  always_comb begin
    logic stop;
    stop      = 1'b0;
    taken_cut = 1'b0;
    for (int i = 0; i < FETCH_W; i++) begin
      win[i]       = q[PW'((int'(head) + i) % IQ_DEPTH)];
      win_valid[i] = !stop && (i < int'(count));
      if (win_valid[i] && win[i].form == F_JCC && win[i].br_taken) begin
        stop = 1'b1;
        if (i + 1 < int'(count) && i + 1 < FETCH_W) taken_cut = 1'b1;
      end
    end
  end

  logic [CW-1:0] n_in;
  assign n_in = (in_ready) ? CW'(in_count) : '0;

  // queue storage: no reset, only entries below `count` are ever read
  always_ff @(posedge clk)
    for (int i = 0; i < FETCH_W; i++)
      if (i < int'(n_in)) q[PW'((int'(tail) + i) % IQ_DEPTH)] <= in_instr[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      tail  <= PW'((int'(tail) + int'(n_in)) % IQ_DEPTH);
      head  <= PW'((int'(head) + int'(take)) % IQ_DEPTH);
      count <= count + n_in - CW'(take);
    end
  end

endmodule
