// pulse: delayed pulse generator functional block.
//
// While ENABLE is high, a rising edge on TRIG starts one output pulse of WIDTH
// clocks that begins DELAY clocks later: if clock edge E samples the trigger
// edge, OUT is high after edges E+DELAY .. E+DELAY+WIDTH-1 (so with DELAY 0
// it rises on E itself). WIDTH 0 acts as 1. One pulse
// is handled at a time: a trigger edge that arrives while a pulse is pending
// or running is dropped and counted in DROPPED. Dropping ENABLE aborts the
// pulse. The framework only names pulse generators; delay, width and the drop
// rule are this design's own.
module pulse (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        trig,
  input  logic [31:0] delay,
  input  logic [31:0] width,
  output logic        out,
  output logic [31:0] dropped
);

  typedef enum logic [1:0] {IDLE, WAIT, HIGH} state_e;
  state_e      state;
  logic [31:0] cnt, width_m1;
  logic        trig_d, rise;

  always_comb begin
    width_m1 = (width == 32'd0) ? 32'd0 : width - 32'd1;
    rise     = trig && !trig_d;
    out      = (state == HIGH);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      trig_d  <= 1'b0;
      dropped <= '0;
    end else begin
      trig_d <= trig;
      if (!enable) begin
        state <= IDLE;
      end else begin
        unique case (state)
          IDLE: if (rise) begin
            if (delay == 32'd0) begin
              state <= HIGH;
              cnt   <= width_m1;
            end else begin
              state <= WAIT;
              cnt   <= delay - 32'd1;
            end
          end
          WAIT: begin
            if (rise) dropped <= dropped + 32'd1;
            if (cnt == 32'd0) begin
              state <= HIGH;
              cnt   <= width_m1;
            end else cnt <= cnt - 32'd1;
          end
          HIGH: begin
            if (rise) dropped <= dropped + 32'd1;
            if (cnt == 32'd0) state <= IDLE;
            else              cnt <= cnt - 32'd1;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
