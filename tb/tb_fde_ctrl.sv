// tb_fde_ctrl: drives the stage controller through idle rows, a training of
// NTRAIN subblocks with gaps between rows, a data stage with errors, a
// retraining started in the middle of the data stage, and checks every
// decoded strobe and the row counter against a cycle model.
module tb_fde_ctrl;
  import fde_pkg::*;
  logic clk = 0, rst_n = 0;
  logic train_start, r_valid, e_valid, lms_en;
  stage_e stage;
  logic [ROW_W-1:0] row;
  logic tr_first, tr_acc, tr_last, eq_go, lms_go, e_pop, data_enter;
  int checks = 0, failures = 0, cycles = 0;
  int n_enter = 0, n_retrain = 0;

  fde_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  stage_e m_stage = ST_IDLE;
  int m_row = 0, m_blk = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("cycle %0d %s: got %0d exp %0d", cycles, what, got, exp); end
  endtask

  // one cycle with the given inputs; checks the combinational outputs
  task automatic step(bit ts, bit rv, bit ev, bit le);
    stage_e s; int rw, bk;
    @(negedge clk);
    train_start = ts; r_valid = rv; e_valid = ev; lms_en = le;
    s = ts ? ST_TRAIN : m_stage; rw = ts ? 0 : m_row; bk = ts ? 0 : m_blk;
    #1;
    chk("stage", int'(stage), int'(s));
    chk("row", int'(row), rw);
    chk("tr_first", tr_first, rv && s == ST_TRAIN && bk == 0);
    chk("tr_last",  tr_last,  rv && s == ST_TRAIN && bk == N_TRAIN - 1);
    chk("tr_acc",   tr_acc,   rv && s == ST_TRAIN && bk != N_TRAIN - 1);
    chk("eq_go",    eq_go,    rv && s == ST_DATA);
    chk("e_pop",    e_pop,    ev && s == ST_DATA);
    chk("lms_go",   lms_go,   ev && le && s == ST_DATA);
    chk("data_enter", data_enter, rv && s == ST_TRAIN && bk == N_TRAIN - 1 && rw == ROWS - 1);
    if (data_enter) n_enter++;
    if (ts && m_stage == ST_DATA) n_retrain++;
    // advance the model
    m_stage = s; m_row = rw; m_blk = bk;
    if (rv && s != ST_IDLE) begin
      m_row = (rw + 1) % ROWS;
      if (s == ST_TRAIN && rw == ROWS - 1) begin
        if (bk == N_TRAIN - 1) begin m_blk = 0; m_stage = ST_DATA; end
        else m_blk = bk + 1;
      end
    end
  endtask

  initial begin
    train_start = 0; r_valid = 0; e_valid = 0; lms_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) step(0, 1'($urandom()), 1'($urandom()), 1);   // idle
    step(1, 0, 0, 1);                                   // start, no row yet
    for (int i = 0; i < N_TRAIN * ROWS * 2; i++) step(0, ($urandom() % 4) != 0, 0, 1);
    for (int i = 0; i < 600; i++) step(0, 1'($urandom()), 1'($urandom()), 1'($urandom()));
    step(1, 1, 0, 1);                                   // retrain, row 0 now
    for (int i = 0; i < N_TRAIN * ROWS + 200; i++) step(0, 1, 1'($urandom()), 1);
    chk("entered data twice", n_enter, 2);
    chk("retrained once", n_retrain, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
