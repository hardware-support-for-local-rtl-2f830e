// Compute-unit stand-in shared by the workload testbenches.
//
// Included inside a testbench module that instantiates gpu_localtm_lds as
// `dut` with the signal names used below. It issues commands one at a time,
// interleaving the four wavefronts round-robin, and runs a transactional
// program per wavefront: TX.Begin, NSTEPS body steps (the including module's
// body_step task issues the LDS instructions), TX.Commit. A failed commit
// restarts with EXEC = TCM; a commit hands the committed lanes to on_commit,
// and next_exec gives the lanes that need another transaction (0 = done).
// The including module defines NSTEPS, body_step, on_begin, on_commit,
// next_exec, and the variables checks and failures.

int n_commits = 0, n_restarts = 0, n_stalls = 0, n_wfser = 0, n_wgser = 0;
int n_lane_commits = 0, n_lane_aborts = 0;
longint commit_seq = 0;

task automatic chk(input string what, input longint got, input longint exp);
  checks++;
  if (got !== exp) begin
    failures++;
    $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
  end
endtask

// issue one command and wait for its response
task automatic run_cmd(input cmd_e c, input int wf, input logic [63:0] ex);
  cmd_i = c; cmd_wf_i = 2'(wf); cmd_exec_i = ex; cmd_valid_i = 1;
  do @(posedge clk); while (!cmd_ready_o);
  #1 cmd_valid_i = 0;
  do @(posedge clk); while (!resp_valid_o);
  #1;
endtask

// plain single-word access through lane 0 of wavefront 0
task automatic plain(input bit we, input int a, input logic [31:0] d, output logic [31:0] q);
  cmd_addr_i = '0; cmd_addr_i[0] = 14'(a); cmd_wdata_i = '0; cmd_wdata_i[0] = d;
  run_cmd(we ? CMD_LDS_WRITE : CMD_LDS_READ, 0, 64'h1);
  q = resp_rdata_o[0];
endtask

// run the transactional program on all wavefronts until every lane is done
task automatic run_program(input int max_cmds);
  int pc [4];
  logic [63:0] exec [4];
  int wf, ndone, guard;
  for (int w = 0; w < 4; w++) begin
    exec[w] = next_exec(w);
    pc[w] = (exec[w] == '0) ? -1 : 0;
  end
  wf = 0; guard = 0;
  ndone = 0;
  for (int w = 0; w < 4; w++) if (pc[w] < 0) ndone++;
  while (ndone < 4 && guard < max_cmds) begin
    guard++;
    wf = (wf + 1) % 4;
    if (pc[wf] < 0) continue;
    if (pc[wf] == 0) begin
      if (wg_lock_o && wg_lock_wf_o != 2'(wf)) begin
        cmd_i = CMD_TX_BEGIN; cmd_wf_i = 2'(wf); cmd_exec_i = exec[wf]; cmd_valid_i = 1;
        @(posedge clk); #1 cmd_valid_i = 0;
        n_stalls++;
        continue;
      end
      on_begin(wf, exec[wf]);
      run_cmd(CMD_TX_BEGIN, wf, exec[wf]);
      if (mode_o[wf] == MODE_WF_SERIAL) n_wfser++;
      if (mode_o[wf] == MODE_WG_SERIAL) n_wgser++;
      pc[wf] = 1;
    end else if (pc[wf] <= NSTEPS) begin
      body_step(wf, pc[wf] - 1, exec[wf] & ~tcm_o[wf]);
      pc[wf]++;
    end else begin
      run_cmd(CMD_TX_COMMIT, wf, exec[wf]);
      n_lane_commits += $countones(resp_done_o);
      if (resp_done_o != '0) begin
        commit_seq++;
        on_commit(wf, resp_done_o);
      end
      if (resp_restart_o) begin
        n_restarts++;
        n_lane_aborts += $countones(resp_exec_new_o);
        exec[wf] = resp_exec_new_o;
        pc[wf] = 0;
      end else begin
        n_commits++;
        exec[wf] = next_exec(wf);
        pc[wf] = (exec[wf] == '0) ? -1 : 0;
        if (pc[wf] < 0) ndone++;
      end
    end
  end
  chk("program finished", ndone, 4);
endtask
