// Espresso controller: phase sequencer with a 9-bit cycle counter.
//
// After reset the controller sits in IDLE for one cycle and then runs:
//   LOAD  256 cycles, counter 0..255, one key/IV/padding bit per cycle;
//   SET   (only if HAS_SET) one cycle, counter 256, in which Espresso-L
//         applies its compensation to the loaded state;
//   INIT  256 cycles with the filter output fed back;
//   WORK  until the next reset, keystream is produced.
// The counter advances in LOAD, SET and INIT. LOAD ends when it reaches
// 256; INIT ends when it wraps to 0 (1 with SET, since SET used one count),
// so INIT always lasts 256 cycles. The counter holds in IDLE and WORK.
// load is high exactly in LOAD and work exactly in WORK. Reset is
// synchronous and active high (the reset style is this design's choice).
module espresso_ctrl
  import espresso_pkg::*;
#(
  parameter bit HAS_SET = 1'b0  // insert the Espresso-L SET cycle
) (
  input  logic             clk,
  input  logic             rst,
  output fsm_t             state,
  output logic [CNT_W-1:0] cnt,
  output logic             load,
  output logic             work
);
  localparam logic [CNT_W-1:0] LOAD_LAST = CNT_W'(N - 1);          // 255
  localparam logic [CNT_W-1:0] INIT_LAST = HAS_SET ? '0 : '1;      // 0 or 511

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          cnt   <= '0;
          state <= ST_LOAD;
        end
        ST_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == LOAD_LAST) state <= HAS_SET ? ST_SET : ST_INIT;
        end
        ST_SET: begin
          cnt   <= cnt + 1'b1;
          state <= ST_INIT;
        end
        ST_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == INIT_LAST) state <= ST_WORK;
        end
        ST_WORK: state <= ST_WORK;
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign load = (state == ST_LOAD);
  assign work = (state == ST_WORK);

  // SET is only ever entered by the Espresso-L controller.
  if (!HAS_SET) begin : g_no_set
    a_no_set: assert property (@(posedge clk) disable iff (rst)
                               state != ST_SET);
  end
  a_excl:   assert property (@(posedge clk) !(load && work));
endmodule
