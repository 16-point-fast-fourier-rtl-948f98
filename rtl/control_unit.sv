// control_unit: the FSM that turns the fully parallel FFT datapath into a
// serial-in / serial-out core. As in the document it moves between filling the
// input SIPO and reading out the output PISO, counting cycles with a 6-bit
// counter (cyc_cnt).
//
//   IDLE : waits for start.
//   FILL : DEPTH cycles; sipo_en is high and one sample is taken from the
//          serial input each cycle.
//   READ : cycle cnt = 0 pulses load, so the PISOs capture the combinational
//          datapath result computed from the full SIPO; cycles cnt = 1..DEPTH
//          pulse piso_en and one result word leaves per cycle; then IDLE.
//
// out_valid is registered so it lines up with the PISO's registered output:
// it is high in exactly the DEPTH cycles in which so holds result words 0..15.
// With start seen in cycle 0, samples are taken in cycles 1..16 and result
// word k is on the outputs in cycle 19+k (34 cycles for a full pass; the
// document quotes 16 cycles to fill and compute plus 16 to read).
// The document derives gated clocks for the registers; this design uses
// clock enables. State encoding, the exact counter compare values and the
// asynchronous active-high reset are this design's choices. The assertions
// at the end use rst as a synchronous disable while the registers use it as an
// asynchronous clear; lint tools note the mixed use, which is intended.
module control_unit #(
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic sipo_en,    // shift the input register (sample accepted)
  output logic load,       // parallel-load the output registers
  output logic piso_en,    // shift the output registers
  output logic out_valid,  // a result word is on the serial outputs
  output logic busy        // not in IDLE; start is ignored
);

  typedef enum logic [1:0] {IDLE, FILL, READ} state_t;

  state_t     state;
  logic [5:0] cyc_cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= IDLE;
      cyc_cnt   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= piso_en;
      unique case (state)
        IDLE: begin
          cyc_cnt <= '0;
          if (start) state <= FILL;
        end
        FILL: begin
          if (cyc_cnt == 6'(DEPTH - 1)) begin
            state   <= READ;
            cyc_cnt <= '0;
          end else begin
            cyc_cnt <= cyc_cnt + 6'd1;
          end
        end
        READ: begin
          if (cyc_cnt == 6'(DEPTH)) begin
            state   <= IDLE;
            cyc_cnt <= '0;
          end else begin
            cyc_cnt <= cyc_cnt + 6'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    sipo_en = (state == FILL);
    load    = (state == READ) && (cyc_cnt == '0);
    piso_en = (state == READ) && (cyc_cnt != '0);
    busy    = (state != IDLE);
  end

  // The output registers are never loaded and shifted in the same cycle, and
  // the input register is never shifted while results are read out.
  a_load_shift_excl : assert property (@(posedge clk) disable iff (rst) !(load && piso_en));
  a_fill_read_excl  : assert property (@(posedge clk) disable iff (rst) !(sipo_en && (load || piso_en)));
  a_cnt_range       : assert property (@(posedge clk) disable iff (rst) cyc_cnt <= 6'(DEPTH));

endmodule
