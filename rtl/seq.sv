// seq: sequencer functional block.
//
// The sequencer walks through a table of frames written over the CSR bus.
// Each frame names a trigger condition on the block's inputs (three bits A..C
// and three positions A..C) and, once the condition holds, drives the six
// outputs OUTA..OUTF with OUT1 for TIME1 clocks and then with OUT2 for TIME2
// clocks. A frame is played REPEATS times (0 acts as 1) before the next frame;
// after the last frame the table is played again, TABLE_REPEATS times in all
// (0: forever). A rising edge of ENABLE starts the table from frame 0 and sets
// ACTIVE; the end of the table or ENABLE going low clears ACTIVE and the
// outputs. This is what lets the block fire a detector when encoder
// positions pass a list of compare points.
//
// Frame format, four 32-bit words pushed in order through TABLE_DATA:
//   word 0: [31:16] REPEATS, [15:12] TRIGGER (panda_pkg::seq_trig_e),
//           [11:6] OUT2, [5:0] OUT1 (bit 0 is OUTA)
//   word 1: POSITION, signed, compared with POSA..POSC
//   word 2: TIME1 (clocks, 0 acts as 1)
//   word 3: TIME2 (clocks, 0 acts as 1)
// A TABLE_START strobe empties the table; TABLE_LINES counts complete frames.
//
// Timing: loading a frame takes two clocks (memory read); the clock after the
// trigger condition is seen the outputs show OUT1. The inputs, the outputs and
// ACTIVE are those of the sequencer in the framework's example; the frame
// format, trigger codes and repeat rules are this design's own.
module seq
  import panda_pkg::*;
#(
  parameter int unsigned TABLE_DEPTH = 1024   // frames
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        bita,
  input  logic        bitb,
  input  logic        bitc,
  input  logic [31:0] posa,
  input  logic [31:0] posb,
  input  logic [31:0] posc,
  input  logic [31:0] table_repeats,
  input  logic        table_start,
  input  logic        table_wr,
  input  logic [31:0] table_wdata,
  output logic        active,
  output logic [5:0]  out,          // OUTA..OUTF in bits 0..5
  output logic [31:0] table_lines,
  output logic [31:0] line,         // frame being played
  output logic [31:0] line_repeat   // repeats of it done so far
);

  localparam int unsigned AW = $clog2(TABLE_DEPTH);

  typedef struct packed {
    logic [31:0] time2;
    logic [31:0] time1;
    logic [31:0] position;
    logic [15:0] repeats;
    logic [3:0]  trigger;
    logic [5:0]  out2;
    logic [5:0]  out1;
  } frame_t;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LOAD2, S_WAIT, S_PHASE1, S_PHASE2} state_e;

  frame_t          mem [TABLE_DEPTH];
  frame_t          rd_frame, frame, wr_frame;
  logic            mem_we;
  logic [2:0][31:0] wbuf;
  logic [1:0]      wcnt;
  state_e          state;
  logic            enable_d, trig_ok, last_line, last_table;
  logic [31:0]     timer, table_repeat;

  // Table write: assemble four words, store the frame
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt        <= '0;
      table_lines <= '0;
      wbuf        <= '0;
    end else if (table_start) begin
      wcnt        <= '0;
      table_lines <= '0;
    end else if (table_wr) begin
      if (wcnt == 2'd3) begin
        if (mem_we) table_lines <= table_lines + 32'd1;
      end else begin
        wbuf[wcnt] <= table_wdata;
      end
      wcnt <= wcnt + 2'd1;
    end
  end

  always_comb begin
    mem_we    = !table_start && table_wr && wcnt == 2'd3 && table_lines < TABLE_DEPTH;
    wr_frame  = '{time2: table_wdata, time1: wbuf[2], position: wbuf[1],
                  repeats: wbuf[0][31:16], trigger: wbuf[0][15:12],
                  out2: wbuf[0][11:6], out1: wbuf[0][5:0]};
  end

  // Table memory: one write port, one registered read port
  always_ff @(posedge clk) begin
    if (mem_we) mem[table_lines[AW-1:0]] <= wr_frame;
    rd_frame <= mem[line[AW-1:0]];
  end

  always_comb begin
    unique case (seq_trig_e'(frame.trigger))
      TRIG_IMMEDIATE: trig_ok = 1'b1;
      TRIG_BITA_0:    trig_ok = !bita;
      TRIG_BITA_1:    trig_ok = bita;
      TRIG_BITB_0:    trig_ok = !bitb;
      TRIG_BITB_1:    trig_ok = bitb;
      TRIG_BITC_0:    trig_ok = !bitc;
      TRIG_BITC_1:    trig_ok = bitc;
      TRIG_POSA_GE:   trig_ok = $signed(posa) >= $signed(frame.position);
      TRIG_POSA_LE:   trig_ok = $signed(posa) <= $signed(frame.position);
      TRIG_POSB_GE:   trig_ok = $signed(posb) >= $signed(frame.position);
      TRIG_POSB_LE:   trig_ok = $signed(posb) <= $signed(frame.position);
      TRIG_POSC_GE:   trig_ok = $signed(posc) >= $signed(frame.position);
      TRIG_POSC_LE:   trig_ok = $signed(posc) <= $signed(frame.position);
      default:        trig_ok = 1'b0;
    endcase
    last_line  = (line + 32'd1 >= table_lines);
    last_table = (table_repeats != 32'd0) && (table_repeat + 32'd1 >= table_repeats);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      enable_d     <= 1'b0;
      active       <= 1'b0;
      out          <= '0;
      line         <= '0;
      line_repeat  <= '0;
      table_repeat <= '0;
      timer        <= '0;
      frame        <= '0;
    end else begin
      enable_d <= enable;
      if (!enable) begin
        state  <= S_IDLE;
        active <= 1'b0;
        out    <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (!enable_d && table_lines != 32'd0) begin
            active       <= 1'b1;
            line         <= '0;
            line_repeat  <= '0;
            table_repeat <= '0;
            state        <= S_LOAD;
          end
          S_LOAD:  state <= S_LOAD2;
          S_LOAD2: begin
            frame <= rd_frame;
            state <= S_WAIT;
          end
          S_WAIT: if (trig_ok) begin
            out   <= frame.out1;
            timer <= (frame.time1 == 32'd0) ? 32'd0 : frame.time1 - 32'd1;
            state <= S_PHASE1;
          end
          S_PHASE1: if (timer == 32'd0) begin
            out   <= frame.out2;
            timer <= (frame.time2 == 32'd0) ? 32'd0 : frame.time2 - 32'd1;
            state <= S_PHASE2;
          end else timer <= timer - 32'd1;
          S_PHASE2: if (timer == 32'd0) begin
            if (line_repeat + 32'd1 < 32'(frame.repeats)) begin
              line_repeat <= line_repeat + 32'd1;
              state       <= S_WAIT;
            end else begin
              line_repeat <= '0;
              if (!last_line) begin
                line  <= line + 32'd1;
                state <= S_LOAD;
              end else if (!last_table) begin
                line         <= '0;
                table_repeat <= table_repeat + 32'd1;
                state        <= S_LOAD;
              end else begin
                active <= 1'b0;
                out    <= '0;
                state  <= S_IDLE;
              end
            end
          end else timer <= timer - 32'd1;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
