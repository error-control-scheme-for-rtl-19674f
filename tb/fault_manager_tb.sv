// fault_manager_tb: verdict priority, alarm, output suppression, event
// counters and the one-cycle latency of the system-level fault manager
// (64 data bits, RO = 4). Every verdict class is produced and counted.
module fault_manager_tb;
  import rk_pkg::event_t;
  import rk_pkg::EV_CLEAN;
  import rk_pkg::EV_CORRECTED;
  import rk_pkg::EV_SUSPICIOUS;
  import rk_pkg::EV_CPC_FAIL;
  import rk_pkg::EV_SYSTEM;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [63:0] data;
  logic [3:0]  cpc;
  logic rk_err, rk_cor, rk_sus, tamper, anomaly, cons;
  logic out_valid, alarm;
  logic [63:0] out_data;
  event_t ev;
  logic [15:0] n_cor, n_alarm;
  int checks = 0, failures = 0, cycles = 0;
  int seen [5];
  int exp_cor = 0, exp_alarm = 0;

  fault_manager #(.KBITS(64), .RO(4)) dut (
    .clk, .rst_n, .in_valid, .data, .cpc, .rk_err, .rk_corrected(rk_cor),
    .rk_suspicious(rk_sus), .tamper, .anomaly, .consistency_err(cons),
    .out_valid, .out_data, .alarm, .event_class(ev), .n_corrected(n_cor), .n_alarm
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_cpc(input logic [63:0] v);
    logic [3:0] e, b[16];
    for (int i = 0; i < 16; i++) b[i] = v[4*i +: 4];
    e = rmul(rmul(b[15], b[15]), b[15]) ^ rmul(b[14], b[15]);
    for (int i = 0; i < 14; i += 2) e = e ^ rmul(b[i], b[i+1]);
    return e;
  endfunction

  // Present one word, then check the registered result a cycle later.
  task automatic word(input int kind, input int sys);
    int exp_ev;
    logic exp_alarm_b;
    data = {$urandom, $urandom};
    cpc  = ref_cpc(data);
    rk_err = 0; rk_cor = 0; rk_sus = 0;
    tamper = (sys == 1); anomaly = (sys == 2); cons = (sys == 3);
    case (kind)
      1: begin rk_err = 1; rk_cor = 1; end                  // corrected
      2: begin rk_err = 1; rk_sus = 1; end                  // suspicious
      3: cpc = cpc ^ 4'($urandom_range(1, 15));             // CPC mismatch
      default: ;
    endcase
    if (kind == 2)                     exp_ev = 2;
    else if (kind == 3)                exp_ev = 3;
    else if (sys != 0)                 exp_ev = 4;
    else if (kind == 1)                exp_ev = 1;
    else                               exp_ev = 0;
    exp_alarm_b = (exp_ev >= 2);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || alarm !== exp_alarm_b || int'(ev) != exp_ev ||
        out_data !== (exp_alarm_b ? 64'd0 : data)) begin
      failures++;
      $display("FAIL kind %0d sys %0d: valid %0d alarm %0d ev %0d", kind, sys, out_valid, alarm, ev);
    end
    seen[exp_ev]++;
    if (exp_ev == 1) exp_cor++;
    if (exp_alarm_b) exp_alarm++;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid held"); end
  endtask

  initial begin
    data = '0; cpc = '0; rk_err = 0; rk_cor = 0; rk_sus = 0; tamper = 0; anomaly = 0; cons = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (out_valid || n_cor != 0 || n_alarm != 0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 200; n++) word(n % 4, (n % 7 == 6) ? 1 + (n % 3) : 0);
    checks++;
    if (n_cor != 16'(exp_cor) || n_alarm != 16'(exp_alarm)) begin
      failures++; $display("FAIL counters %0d/%0d expected %0d/%0d", n_cor, n_alarm, exp_cor, exp_alarm);
    end
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL verdict %0d never produced", c); end
    end
    $display("verdicts clean %0d corrected %0d suspicious %0d cpc_fail %0d system %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
