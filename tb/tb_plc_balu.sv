// tb_plc_balu: drives the bit ALU through ladder sequences whose results are
// worked out by hand: contact logic, block stack (ANB/ORB), MPS/MRD/MPP,
// master control gating, step controller gating, pulse contacts and PLS/PLF.
// A second part runs a long random instruction stream against a reference
// model written with queues (stack depths kept inside the default sizes) and
// compares acc, gate, wr_bit, hist_wr and pulse_seen for every instruction.
module tb_plc_balu;
  import plc_pkg::*;

  logic clk = 0, rst_n = 0, scan_init = 0, exec = 0;
  bop_e bop = B_NOP;
  logic bit_in = 0, hist_in = 0;
  logic acc, gate, wr_bit, hist_wr, pulse_seen;
  int checks = 0, failures = 0;

  plc_balu dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  // one instruction; returns the pulse_seen seen during exec
  task automatic op(input bop_e o, input logic b = 0, input logic h = 0);
    @(negedge clk);
    bop = o; bit_in = b; hist_in = h; exec = 1;
    @(negedge clk);
    exec = 0;
  endtask


  // ---------------- random stream against a reference model ----------------
  logic m_acc, m_step;
  logic m_bstk[$], m_mstk[$], m_mcs[$];

  function automatic logic m_mc_en();
    return (m_mcs.size() == 0) ? 1'b1 : m_mcs[$];
  endfunction

  task automatic random_stream(input int n);
    bop_e ops [29] = '{B_NOP, B_LD, B_LDI, B_AND, B_ANI, B_OR, B_ORI, B_XOR,
                       B_LDP, B_LDF, B_ANDP, B_ANDF, B_ORP, B_ORF, B_PLS, B_PLF,
                       B_OUT, B_SET, B_RST, B_ANB, B_ORB, B_MPS, B_MRD, B_MPP,
                       B_INV, B_MC, B_MCR, B_STL, B_RETS};
    bop_e o;
    logic b, h, g, rise, fall, e, ewr, ehw, eps, t;
    m_acc = 0; m_step = 1; m_bstk.delete(); m_mstk.delete(); m_mcs.delete();
    @(negedge clk); scan_init = 1; @(negedge clk); scan_init = 0;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(99) == 0) begin
        @(negedge clk); scan_init = 1; @(negedge clk); scan_init = 0;
        m_acc = 0; m_step = 1; m_bstk.delete(); m_mstk.delete(); m_mcs.delete();
      end
      o = ops[$urandom_range(28)];
      // keep the stacks inside their default depths
      if (o inside {B_LD, B_LDI, B_LDP, B_LDF} && m_bstk.size() >= 8) o = B_AND;
      if (o inside {B_ANB, B_ORB} && m_bstk.size() == 0) o = B_INV;
      if (o == B_MPS && m_mstk.size() >= 16) o = B_MRD;
      if (o inside {B_MRD, B_MPP} && m_mstk.size() == 0) o = B_MPS;
      if (o == B_MC && m_mcs.size() >= 8) o = B_MCR;
      b = 1'($urandom); h = 1'($urandom);
      g    = m_mc_en() & m_step;
      rise = b & ~h;
      fall = ~b & h;
      e    = (o inside {B_LDF, B_ANDF, B_ORF}) ? fall : rise;
      ewr  = b; ehw = b; eps = 0;
      case (o)
        B_OUT: ewr = m_acc & g;
        B_SET: ewr = (m_acc & g) ? 1'b1 : b;
        B_RST: ewr = (m_acc & g) ? 1'b0 : b;
        B_PLS: begin ewr = m_acc & ~h & g; ehw = m_acc; eps = ewr; end
        B_PLF: begin ewr = ~m_acc & h & g; ehw = m_acc; eps = ewr; end
        B_LDP, B_LDF, B_ANDP, B_ANDF, B_ORP, B_ORF: eps = e;
        default: ;
      endcase
      @(negedge clk);
      bop = o; bit_in = b; hist_in = h; exec = 1; #1;
      chk(gate, g, $sformatf("rand %0d %s gate", i, o.name()));
      chk(wr_bit, ewr, $sformatf("rand %0d %s wr_bit", i, o.name()));
      chk(hist_wr, ehw, $sformatf("rand %0d %s hist_wr", i, o.name()));
      chk(pulse_seen, eps, $sformatf("rand %0d %s pulse_seen", i, o.name()));
      @(negedge clk);
      exec = 0;
      case (o)
        B_LD, B_LDI, B_LDP, B_LDF: begin
          m_bstk.push_back(m_acc);
          m_acc = (o == B_LD) ? b : (o == B_LDI) ? ~b : e;
        end
        B_AND:  m_acc = m_acc & b;
        B_ANI:  m_acc = m_acc & ~b;
        B_OR:   m_acc = m_acc | b;
        B_ORI:  m_acc = m_acc | ~b;
        B_XOR:  m_acc = m_acc ^ b;
        B_ANDP, B_ANDF: m_acc = m_acc & e;
        B_ORP, B_ORF:   m_acc = m_acc | e;
        B_ANB:  begin t = m_bstk.pop_back(); m_acc = t & m_acc; end
        B_ORB:  begin t = m_bstk.pop_back(); m_acc = t | m_acc; end
        B_MPS:  m_mstk.push_back(m_acc);
        B_MRD:  m_acc = m_mstk[$];
        B_MPP:  m_acc = m_mstk.pop_back();
        B_INV:  m_acc = ~m_acc;
        B_MC:   m_mcs.push_back(m_acc & m_mc_en());
        B_MCR:  if (m_mcs.size() != 0) void'(m_mcs.pop_back());
        B_STL:  begin m_step = b; m_acc = b; end
        B_RETS: m_step = 1;
        default: ;
      endcase
      chk(acc, m_acc, $sformatf("rand %0d %s acc", i, o.name()));
      chk(gate, m_mc_en() & m_step, $sformatf("rand %0d %s gate after", i, o.name()));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // (X0 AND X1) OR X2 -> 1 AND 0 OR 1 = 1
    op(B_LD, 1); op(B_AND, 0); op(B_OR, 1);            chk(acc, 1, "LD AND OR");
    op(B_LDI, 1);                                      chk(acc, 0, "LDI");
    op(B_ANI, 0);                                      chk(acc, 0, "ANI keeps 0");
    op(B_ORI, 0);                                      chk(acc, 1, "ORI");
    op(B_XOR, 1);                                      chk(acc, 0, "XOR");
    op(B_INV);                                         chk(acc, 1, "INV");
    // block logic: (1 OR 0) AND (0 OR 0) = 0 ; (1) OR (0) = 1
    op(B_LD, 1); op(B_OR, 0); op(B_LD, 0); op(B_OR, 0); op(B_ANB);
    chk(acc, 0, "ANB");
    op(B_LD, 1); op(B_LD, 0); op(B_ORB);               chk(acc, 1, "ORB");
    op(B_LD, 0); op(B_LD, 0); op(B_ORB);               chk(acc, 0, "ORB 0|0");
    // MPS/MRD/MPP
    op(B_LD, 1); op(B_MPS); op(B_AND, 0);              chk(acc, 0, "after MPS AND");
    op(B_MRD);                                         chk(acc, 1, "MRD");
    op(B_AND, 0); op(B_MPP);                           chk(acc, 1, "MPP");
    op(B_LD, 0); op(B_MRD);                            chk(acc, 0, "MRD after MPP reads older slot (reset 0)");
    // OUT/SET/RST with gating
    op(B_LD, 1);
    bop = B_OUT; bit_in = 0; #1;                       chk(wr_bit, 1, "OUT writes acc");
    bop = B_RST; bit_in = 1; #1;                       chk(wr_bit, 0, "RST clears");
    op(B_LD, 0);
    bop = B_SET; bit_in = 0; #1;                       chk(wr_bit, 0, "SET holds when acc 0");
    bop = B_RST; bit_in = 1; #1;                       chk(wr_bit, 1, "RST holds when acc 0");
    // master control: MC with acc 0 disables outputs
    op(B_LD, 0); op(B_MC);                             chk(gate, 0, "MC off gates");
    op(B_LD, 1);
    bop = B_OUT; bit_in = 1; #1;                       chk(wr_bit, 0, "OUT forced off under MC");
    op(B_LD, 1); op(B_MC);                             chk(gate, 0, "nested MC stays off");
    op(B_MCR);                                         chk(gate, 0, "MCR to level 1");
    op(B_MCR);                                         chk(gate, 1, "MCR to level 0");
    op(B_LD, 1); op(B_MC);                             chk(gate, 1, "MC on");
    op(B_MCR);
    // step controller
    op(B_STL, 0);                                      chk(gate, 0, "STL inactive step");
    chk(acc, 0, "STL loads step bit");
    op(B_RETS);                                        chk(gate, 1, "RETS");
    // pulse contacts
    @(negedge clk); bop = B_LDP; bit_in = 1; hist_in = 0; exec = 1; #1;
    chk(pulse_seen, 1, "LDP edge seen"); chk(hist_wr, 1, "LDP history");
    @(negedge clk); exec = 0;                          chk(acc, 1, "LDP rising");
    op(B_LDP, 1, 1);                                   chk(acc, 0, "LDP no edge");
    op(B_LDF, 0, 1);                                   chk(acc, 1, "LDF falling");
    op(B_LD, 1); op(B_ANDP, 1, 1);                     chk(acc, 0, "ANDP no edge");
    op(B_LD, 1); op(B_ANDF, 0, 1);                     chk(acc, 1, "ANDF");
    op(B_LD, 0); op(B_ORP, 1, 0);                      chk(acc, 1, "ORP");
    op(B_LD, 0); op(B_ORF, 1, 0);                      chk(acc, 0, "ORF no edge");
    // PLS / PLF
    op(B_LD, 1);
    bop = B_PLS; bit_in = 0; hist_in = 0; #1;          chk(wr_bit, 1, "PLS on rising acc");
    chk(hist_wr, 1, "PLS history = acc");
    hist_in = 1; #1;                                   chk(wr_bit, 0, "PLS only one scan");
    op(B_LD, 0);
    bop = B_PLF; hist_in = 1; #1;                      chk(wr_bit, 1, "PLF on falling acc");
    // scan init clears
    @(negedge clk); scan_init = 1; @(negedge clk); scan_init = 0;
    chk(acc, 0, "scan init acc"); chk(gate, 1, "scan init gate");
    random_stream(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
