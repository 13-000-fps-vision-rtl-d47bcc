// out_pipeline: sparse column output of the SIMD array.
//
// Only columns that have something to report push a word, so a line profile
// leaves the chip as a short list of (column, value) pairs instead of a full
// row. Each column has a small local FIFO. A chain of pipeline stages runs
// from the last column down to column 0; stage i forwards the word held by
// stage i+1 if there is one, otherwise it takes the oldest word of its own
// FIFO. Stage 0 drives the output stream.
//
// Output modes: 0/1/2/3 = 8/16/24/32-bit words. The mode in force when a word
// is pushed is stored with it; out_bytes gives 1..4 and the unused upper
// bytes of out_data are zero.
//
// The chip builds this chain as a clockless (asynchronous) pipeline; this RTL
// is a synchronous valid/ready equivalent that moves one word per cycle per
// stage and delivers one word per cycle while out_ready is high (latency of a
// word from column c: c+2 cycles when the chain is empty). The forwarding
// priority, the FIFO depth (default 2) and the sticky overflow flag, set when
// a column pushes into a full FIFO and the word is lost, are this design's
// choices. The ready chain is combinational across all stages.
module out_pipeline #(
  parameter int unsigned N          = 1024,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          mode,
  input  logic [N-1:0]        push,
  input  logic [N-1:0][31:0]  push_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [9:0]          out_col,
  output logic [31:0]         out_data,
  output logic [2:0]          out_bytes,
  output logic                busy,
  output logic                overflow
);
  typedef struct packed {
    logic [9:0]  col;
    logic [1:0]  nb;     // bytes - 1
    logic [31:0] data;
  } item_t;

  localparam int unsigned PW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  item_t [N-1:0]  stage;
  logic  [N-1:0]  sv;          // stage valid
  logic  [N:0]    take;        // take[i+1]: stage i may load this cycle
  logic  [N-1:0]  fifo_ne, fifo_full, ovf_hit;

  assign take[0] = out_ready;

  function automatic logic [31:0] mask(logic [31:0] d, logic [1:0] m);
    unique case (m)
      2'd0:    return {24'h0, d[7:0]};
      2'd1:    return {16'h0, d[15:0]};
      2'd2:    return {8'h0, d[23:0]};
      default: return d;
    endcase
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_node
    item_t          mem [FIFO_DEPTH];
    logic [PW-1:0]  rp, wp;
    logic [PW:0]    cnt;
    logic           from_up, from_fifo, ld;

    assign take[i+1]    = !sv[i] || take[i];
    assign ld           = take[i+1];
    if (i == N-1) begin : g_last
      assign from_up = 1'b0;
    end else begin : g_mid
      assign from_up = sv[i+1];
    end
    assign from_fifo    = ld && !from_up && fifo_ne[i];
    assign fifo_ne[i]   = (cnt != '0);
    assign fifo_full[i] = (cnt == (PW+1)'(FIFO_DEPTH));
    assign ovf_hit[i]   = push[i] && fifo_full[i] && !from_fifo;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rp <= '0; wp <= '0; cnt <= '0;
        sv[i] <= 1'b0;
        stage[i] <= '0;
      end else begin
        if (push[i] && (!fifo_full[i] || from_fifo)) begin
          mem[wp] <= '{col: 10'(i), nb: mode, data: mask(push_data[i], mode)};
          wp <= (wp == PW'(FIFO_DEPTH-1)) ? '0 : wp + 1'b1;
        end
        if (from_fifo) rp <= (rp == PW'(FIFO_DEPTH-1)) ? '0 : rp + 1'b1;
        cnt <= cnt + (PW+1)'(push[i] && (!fifo_full[i] || from_fifo)) - (PW+1)'(from_fifo);
        if (ld) begin
          if (from_up) begin
            if (i < N-1) stage[i] <= stage[(i < N-1) ? i+1 : i];
            sv[i] <= 1'b1;
          end else if (from_fifo) begin
            stage[i] <= mem[rp];
            sv[i] <= 1'b1;
          end else begin
            sv[i] <= 1'b0;
          end
        end
      end
    end
  end

  assign out_valid = sv[0];
  assign out_col   = stage[0].col;
  assign out_data  = stage[0].data;
  assign out_bytes = {1'b0, stage[0].nb} + 3'd1;
  assign busy      = (|sv) || (|fifo_ne);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= 1'b0;
    else if (|ovf_hit) overflow <= 1'b1;
  end

  logic unused;
  assign unused = take[N];
endmodule
