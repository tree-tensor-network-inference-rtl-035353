// tb_node_pp: partial-parallel node contraction, leaf shape (DIN 2, DOUT 4)
// and inner shape (DIN 4, DOUT 8). Random input pairs are offered with
// random gaps and the consumer stalls at random. Every result is compared
// with the reference contraction; the cycles from acceptance to out_valid
// must be LAT * (DIN^2 + DOUT + 1), 36 and 100 here; a stalled result must
// stay put.
module tb_node_pp;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;

  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd16();
    return $signed(16'($urandom)) / 2;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- node A: 2 -> 4 ----
  localparam int DA = 2, OA = 4;
  fx_t  xa [DA], ya [DA], wa [OA*DA*DA], za [OA];
  logic iva = 0, ira, ova, ora = 0;
  node_pp #(.DIN(DA), .DOUT(OA), .LAT(LAT)) u_a (
    .clk, .rst_n, .in_valid(iva), .in_ready(ira), .x(xa), .y(ya), .w(wa),
    .out_valid(ova), .out_ready(ora), .z(za));

  // ---- node B: 4 -> 8 ----
  localparam int DB = 4, OB = 8;
  fx_t  xb [DB], yb [DB], wb [OB*DB*DB], zb [OB];
  logic ivb = 0, irb, ovb, orb = 0;
  node_pp #(.DIN(DB), .DOUT(OB), .LAT(LAT)) u_b (
    .clk, .rst_n, .in_valid(ivb), .in_ready(irb), .x(xb), .y(yb), .w(wb),
    .out_valid(ovb), .out_ready(orb), .z(zb));

  ivec_t wqa, wqb;
  ivec_t expa[$], expb[$];
  int    ta[$], tb_[$];   // acceptance cycles
  int    cyc = 0, na = 0, nb = 0, held = 0;

  bit   ira_taken = 0, irb_taken = 0;
  logic ova_q = 0, ovb_q = 0, ora_prev = 0;
  fx_t  za_q [OA];

  always @(posedge clk) cyc <= cyc + 1;

  // drivers, changed at the falling edge
  initial begin
    ivec_t x, y;
    for (int i = 0; i < OA*DA*DA; i++) begin wqa.push_back(rnd16()); wa[i] = fx_t'(wqa[i]); end
    for (int i = 0; i < OB*DB*DB; i++) begin wqb.push_back(rnd16()); wb[i] = fx_t'(wqb[i]); end
    foreach (xa[i]) begin xa[i] = '0; ya[i] = '0; end
    foreach (xb[i]) begin xb[i] = '0; yb[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (na < 60 || nb < 40) begin
      @(negedge clk);
      ora = ($urandom_range(0, 2) != 0);
      orb = ($urandom_range(0, 2) != 0);
      if (!iva || ira_taken) begin
        iva = (na < 60) && $urandom_range(0, 1);
        x = {}; y = {};
        for (int i = 0; i < DA; i++) begin x.push_back(rnd16()); y.push_back(rnd16()); xa[i] = fx_t'(x[i]); ya[i] = fx_t'(y[i]); end
        if (iva) begin expa.push_back(ref_node(x, y, wqa, DA, OA)); na++; end
      end
      if (!ivb || irb_taken) begin
        ivb = (nb < 40) && $urandom_range(0, 1);
        x = {}; y = {};
        for (int i = 0; i < DB; i++) begin x.push_back(rnd16()); y.push_back(rnd16()); xb[i] = fx_t'(x[i]); yb[i] = fx_t'(y[i]); end
        if (ivb) begin expb.push_back(ref_node(x, y, wqb, DB, OB)); nb++; end
      end
    end
    while (iva || ivb) begin
      @(posedge clk); #1;
      @(negedge clk);
      if (ira_taken) iva = 0;
      if (irb_taken) ivb = 0;
    end
    iva = 0; ivb = 0;
    repeat (400) @(negedge clk) begin ora = 1; orb = 1; end
    check("A results", expa.size(), 0);
    check("B results", expb.size(), 0);
    if (held == 0) failures++;  // a stall must have happened
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors, sampled at the rising edge
  always @(posedge clk) begin
    ira_taken = iva && ira;
    irb_taken = ivb && irb;
    if (ira_taken) ta.push_back(cyc);
    if (irb_taken) tb_.push_back(cyc);
    // latency: first cycle of out_valid after acceptance
    if (!rst_n) begin ova_q = 0; ovb_q = 0; end
    else if (ova && !ova_q) check("A latency", cyc - ta.pop_front(), LAT * (DA*DA + OA + 1));
    if (rst_n && ovb && !ovb_q) check("B latency", cyc - tb_.pop_front(), LAT * (DB*DB + OB + 1));
    if (ova_q && ova && !ora_prev) begin
      held++;
      foreach (za[m]) check("A hold", int'(za[m]), int'(za_q[m]));
    end
    if (ova && ora) begin
      ivec_t e;
      e = expa.pop_front();
      foreach (za[m]) check("A z", int'(za[m]), e[m]);
    end
    if (ovb && orb) begin
      ivec_t e;
      e = expb.pop_front();
      foreach (zb[m]) check("B z", int'(zb[m]), e[m]);
    end
    ova_q    = ova && !ora;
    ovb_q    = ovb && !orb;
    ora_prev = ora;
    za_q     = za;
  end
endmodule
