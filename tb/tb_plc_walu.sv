// tb_plc_walu: random and directed checks of the word ALU. Expected values
// come from a reference written differently from the RTL: BCD conversions go
// through decimal text (%d printed, read back as hex and vice versa), rotates
// are done one bit at a time on a queue-free loop.
module tb_plc_walu;
  import plc_pkg::*;

  aop_e        op;
  logic        w32, cin;
  logic [31:0] d, s;
  logic [63:0] result;
  logic [2:0]  wcount, flags;
  int checks = 0, failures = 0;

  plc_walu dut (.*);

  function automatic longint unsigned tobcd(longint unsigned v);
    string t;
    longint unsigned r = 0;
    t = $sformatf("%0d", v);
    for (int i = 0; i < t.len(); i++) r = (r << 4) | longint'(t[i] - "0");
    return r;
  endfunction
  function automatic longint unsigned frombcd(longint unsigned v);
    string t;
    longint unsigned r = 0;
    t = $sformatf("%0h", v);
    for (int i = 0; i < t.len(); i++) r = r * 10 + longint'(t[i] - "0");
    return r;
  endfunction
  function automatic logic [31:0] bcdrand(int digits);
    logic [31:0] r = 0;
    for (int i = 0; i < digits; i++) r[i*4 +: 4] = 4'($urandom_range(0, 9));
    return r;
  endfunction

  task automatic ref_model(output logic [63:0] er, output logic [2:0] ewc, output logic ec);
    longint unsigned w, mask, a, b, lim, x;
    int n;
    w    = w32 ? 32 : 16;
    mask = w32 ? 64'hFFFF_FFFF : 64'hFFFF;
    lim  = w32 ? 100000000 : 10000;
    a    = d & mask; b = s & mask;
    n    = w32 ? int'(s[4:0]) : int'(s[3:0]);
    ewc  = w32 ? 2 : 1;
    ec   = cin;
    er   = 0;
    case (op)
      A_MOV: er = b;
      A_ADD: begin x = a + b; er = x & mask; ec = x > mask; end
      A_SUB: begin er = (a - b) & mask; ec = a < b; end
      A_MUL: begin er = a * b; ewc = w32 ? 4 : 2; end
      A_DIV: begin ewc = w32 ? 4 : 2; ec = b == 0;
                   if (b != 0) er = ((a % b) << w) | (a / b); end
      A_AND: er = a & b;
      A_OR:  er = a | b;
      A_XOR: er = a ^ b;
      A_BCD: begin er = tobcd(b % lim); ec = b >= lim; end
      A_BIN: er = frombcd(b);
      A_BADD: begin x = frombcd(a) + frombcd(b); ec = x >= lim; er = tobcd(x % lim); end
      A_BSUB: begin ec = frombcd(a) < frombcd(b);
                    er = tobcd((frombcd(a) + lim - frombcd(b)) % lim); end
      A_BMUL: begin er = tobcd(frombcd(a) * frombcd(b)); ewc = w32 ? 4 : 2; end
      A_BDIV: begin ewc = w32 ? 4 : 2; ec = frombcd(b) == 0;
                    if (frombcd(b) != 0)
                      er = (tobcd(frombcd(a) % frombcd(b)) << w) | tobcd(frombcd(a) / frombcd(b)); end
      A_ROL, A_ROR, A_RCL, A_RCR: begin
        x = a;
        for (int i = 0; i < n; i++) begin
          logic msb, lsb;
          msb = x[w-1]; lsb = x[0];
          if (op == A_ROL) x = ((x << 1) | msb) & mask;
          if (op == A_ROR) x = (x >> 1) | (longint'(lsb) << (w-1));
          if (op == A_RCL) begin x = ((x << 1) | ec) & mask; ec = msb; end
          if (op == A_RCR) begin x = (x >> 1) | (longint'(ec) << (w-1)); ec = lsb; end
        end
        er = x;
      end
      A_SHL: er = (a << n) & mask;
      A_SHR: er = a >> n;
      default: er = a;
    endcase
  endtask

  task automatic run(input aop_e o, input logic w, input logic [31:0] dd, input logic [31:0] ss, input logic c);
    logic [63:0] er; logic [2:0] ewc; logic ec;
    op = o; w32 = w; d = dd; s = ss; cin = c; #1;
    ref_model(er, ewc, ec);
    checks++;
    if (result !== er || wcount !== ewc || flags[0] !== ec) begin
      failures++;
      $display("FAIL %s w32=%0d d=%h s=%h cin=%0d: got %h/%0d/c%0d exp %h/%0d/c%0d",
               o.name(), w, dd, ss, c, result, wcount, flags[0], er, ewc, ec);
    end
  endtask

  initial begin
    aop_e ops[20] = '{A_MOV, A_ADD, A_SUB, A_MUL, A_DIV, A_AND, A_OR, A_XOR, A_BCD,
                      A_BIN, A_BADD, A_BSUB, A_BMUL, A_BDIV, A_ROL, A_ROR, A_RCL,
                      A_RCR, A_SHL, A_SHR};
    // directed cases
    run(A_ADD, 0, 32'hFFFF, 32'h0001, 0);
    run(A_ADD, 1, 32'hFFFF_FFFF, 32'h2, 0);
    run(A_DIV, 0, 32'd100, 32'd7, 0);
    run(A_DIV, 1, 32'd100, 32'd0, 0);
    run(A_BCD, 0, 0, 32'd1234, 0);
    run(A_BCD, 1, 0, 32'd98765432, 0);
    run(A_BIN, 1, 0, 32'h9876_5432, 0);
    run(A_BADD, 0, 32'h9999, 32'h0001, 0);
    run(A_BSUB, 0, 32'h0001, 32'h0002, 0);
    run(A_BMUL, 1, 32'h9999_9999, 32'h9999_9999, 0);
    run(A_BDIV, 1, 32'h1234_5678, 32'h0000_0012, 0);
    run(A_RCL, 0, 32'h8001, 32'd1, 0);
    run(A_RCR, 1, 32'h0000_0001, 32'd31, 1);
    run(A_ROL, 0, 32'h8001, 32'd0, 0);
    for (int i = 0; i < 600; i++) begin
      aop_e o; logic w; logic [31:0] dd, ss;
      o  = ops[i % 20];
      w  = i[5];
      dd = $urandom; ss = $urandom;
      if (o inside {A_BIN, A_BADD, A_BSUB, A_BMUL, A_BDIV}) begin
        dd = bcdrand(w ? 8 : 4); ss = bcdrand(w ? 8 : 4);
      end
      if (o inside {A_DIV} && i[6]) ss = ss & 32'h3F;
      run(o, w, dd, ss, 1'($urandom));
    end
    // zero and sign flags
    op = A_SUB; w32 = 0; d = 32'h5; s = 32'h5; cin = 0; #1;
    checks++; if (!flags[1] || flags[2]) begin failures++; $display("FAIL zero flag"); end
    op = A_SUB; w32 = 0; d = 32'h4; s = 32'h5; #1;
    checks++; if (flags[1] || !flags[2]) begin failures++; $display("FAIL sign flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
