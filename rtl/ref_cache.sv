// ref_cache: on-chip copy of the reference image.
//
// The reference image does not change while one floating image is
// registered against it, but the metric is evaluated hundreds of times. The
// cache is filled once from off-chip memory and then replays the image at
// full rate for every evaluation, so only the floating image is read from
// memory afterwards.
// Storage: DIM*DIM/PE words of PE*B bits (one packet per word), a single-port
// style array with synchronous read (mapped to URAM or BRAM).
// Control: a pulse on fill starts a fill: the next DIM*DIM/PE packets on
// in_valid/in_data/in_ready are written in order; filled rises after the last
// one. A pulse on replay streams the whole image out on out_valid/out_data/
// out_ready, one packet per cycle, with back-pressure. busy is high during a
// fill or a replay; fill and replay are ignored while busy.
// From the source: an optional cache in the template that prefetches the
// reference image to save off-chip accesses. The control protocol is this
// design's.
module ref_cache #(
  parameter int unsigned DIM = 512,
  parameter int unsigned PE  = 16,
  parameter int unsigned B   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fill,
  input  logic            replay,
  output logic            busy,
  output logic            filled,
  input  logic            in_valid,
  input  logic [PE*B-1:0] in_data,
  output logic            in_ready,
  output logic            out_valid,
  output logic [PE*B-1:0] out_data,
  input  logic            out_ready
);
  localparam int unsigned NPKT = (DIM * DIM) / PE;
  localparam int unsigned AW   = $clog2(NPKT);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_PLAY} state_e;
  state_e state;

  logic [PE*B-1:0] mem [NPKT];
  logic [AW:0]     ptr;
  logic            wr, rd;

  assign busy     = (state != S_IDLE);
  assign in_ready = (state == S_FILL);
  assign wr       = in_valid && in_ready;
  assign rd       = (state == S_PLAY) && (ptr < (AW+1)'(NPKT)) && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (wr) mem[ptr[AW-1:0]] <= in_data;
    if (rd) out_data <= mem[ptr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ptr <= '0; filled <= 1'b0; out_valid <= 1'b0;
    end else begin
      if (rd) out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          ptr <= '0;
          if (fill) begin
            filled <= 1'b0;
            state  <= S_FILL;
          end else if (replay && filled) begin
            state <= S_PLAY;
          end
        end
        S_FILL: if (wr) begin
          ptr <= ptr + 1'b1;
          if (ptr == (AW+1)'(NPKT - 1)) begin
            filled <= 1'b1;
            state  <= S_IDLE;
          end
        end
        S_PLAY: begin
          if (rd) ptr <= ptr + 1'b1;
          if (ptr == (AW+1)'(NPKT) && (!out_valid || out_ready)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
