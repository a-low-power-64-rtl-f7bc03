// section: 32 memory cells and the five-state machine that governs them.
//
// States: IDLE -> SAMPLING -> WARMUP -> DIGITIZING -> READING -> IDLE.  Each
// transition happens on a one-clock command from the section controller:
//   go_sample   IDLE       -> SAMPLING   (the section becomes the write target)
//   go_stop     SAMPLING   -> WARMUP     (trigger seen, sampling frozen)
//   go_digitize WARMUP     -> DIGITIZING (ADC granted, cells cleared)
//   conv_done   DIGITIZING -> READING    (Gray counter saturated)
//   read_done   READING    -> IDLE       (all cells read out)
// A command that arrives in another state is ignored (and flagged by an
// assertion).  Outputs to the analog slices: `sample_sw` closes the sampling
// switch of the cell addressed by `wr_cell` while the section samples and
// `wr_en` is high; `cmp_en` powers the cell comparators in WARMUP and
// DIGITIZING; `ramp_sw` connects the capacitors' bottom plates to the ramp
// (high) instead of the bottom reference (low) while DIGITIZING.  `rd_data`
// is the Gray word of cell `rd_cell`, combinational.  The 32-cell size and the
// five states follow the original design; the command interface and the switch
// encoding are this design's choice.
module section
  import cherenkov_pkg::*;
#(
  parameter int unsigned CELLS = SEC_CELLS,
  parameter int unsigned W     = DATA_W,
  localparam int unsigned AW   = $clog2(CELLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go_sample,
  input  logic             go_stop,
  input  logic             go_digitize,
  input  logic             conv_done,
  input  logic             read_done,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_cell,
  input  logic [AW-1:0]    rd_cell,
  input  logic [W-1:0]     gray_in,
  input  logic [CELLS-1:0] cmp,
  output sec_state_t       state,
  output logic [CELLS-1:0] sample_sw,
  output logic             cmp_en,
  output logic             ramp_sw,
  output logic [W-1:0]     rd_data
);

  sec_state_t next;
  logic [W-1:0] cell_data [CELLS];
  logic [CELLS-1:0] fired;
  logic convert, clear;

  always_comb begin
    next = state;
    unique case (state)
      ST_IDLE:       if (go_sample)   next = ST_SAMPLING;
      ST_SAMPLING:   if (go_stop)     next = ST_WARMUP;
      ST_WARMUP:     if (go_digitize) next = ST_DIGITIZING;
      ST_DIGITIZING: if (conv_done)   next = ST_READING;
      ST_READING:    if (read_done)   next = ST_IDLE;
      default:                        next = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= next;
  end

  assign convert = (state == ST_DIGITIZING);
  assign clear   = (state == ST_WARMUP) && go_digitize;
  assign cmp_en  = (state == ST_WARMUP) || (state == ST_DIGITIZING);
  assign ramp_sw = convert;

  always_comb begin
    sample_sw = '0;
    if (state == ST_SAMPLING && wr_en) sample_sw[wr_cell] = 1'b1;
  end

  for (genvar i = 0; i < int'(CELLS); i++) begin : g_cell
    memory_cell #(.W(W)) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .convert  (convert),
      .cmp      (cmp[i]),
      .gray_in  (gray_in),
      .data_out (cell_data[i]),
      .fired    (fired[i])
    );
  end

  assign rd_data = cell_data[rd_cell];

  // Commands only make sense in the state they leave.
  a_go_sample: assert property (@(posedge clk) disable iff (!rst_n)
                                go_sample |-> state == ST_IDLE);
  a_go_stop:   assert property (@(posedge clk) disable iff (!rst_n)
                                go_stop |-> state == ST_SAMPLING);
  a_go_dig:    assert property (@(posedge clk) disable iff (!rst_n)
                                go_digitize |-> state == ST_WARMUP);
  a_conv_done: assert property (@(posedge clk) disable iff (!rst_n)
                                conv_done |-> state == ST_DIGITIZING);
  a_read_done: assert property (@(posedge clk) disable iff (!rst_n)
                                read_done |-> state == ST_READING);

endmodule
