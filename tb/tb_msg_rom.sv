// tb_msg_rom: reads the three stored lines and compares them with the expected
// AT command lines, including the byte frame 41 54 2B 43 4D 47 46 3D 31 0D of
// the text-mode command, and checks the end-of-line flag, for each of the three
// default texts. A second instance with another number and a single text
// checks the string parameters.
module tb_msg_rom;
  import pager_pkg::*;
  line_e      line, line2;
  logic [5:0] idx, idx2;
  logic [1:0] sel;
  logic       sel2;
  logic [7:0] ch, ch2;
  logic       last, last2;
  int checks = 0, failures = 0;

  msg_rom dut (.line, .sel, .idx, .char_o(ch), .last);
  msg_rom #(.N_MSG(1), .PHONE("0123456789"), .MSGS({(8*40)'("Motor overload")})) dut2 (
    .line(line2), .sel(sel2), .idx(idx2), .char_o(ch2), .last(last2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_line(bit which, line_e l, byte exp[$]);
    for (int i = 0; i < exp.size(); i++) begin
      if (which) begin line2 = l; idx2 = 6'(i); end else begin line = l; idx = 6'(i); end
      #1;
      check((which ? ch2 : ch) == exp[i], $sformatf("line %0d char %0d: %02h want %02h", l, i, which ? ch2 : ch, exp[i]));
      check((which ? last2 : last) == (i == exp.size() - 1), $sformatf("line %0d last flag at %0d", l, i));
    end
  endtask

  initial begin
    byte q[$];
    sel = 0; sel2 = 0;
    q = '{8'h41, 8'h54, 8'h2B, 8'h43, 8'h4D, 8'h47, 8'h46, 8'h3D, 8'h31, 8'h0D};
    expect_line(0, LINE_INIT, q);
    q = '{"A","T","+","C","M","G","S","=",8'h22,"9","3","6","3","6","6","5",8'h22,8'h0D};
    expect_line(0, LINE_DEST, q);
    q = '{"H","e","l","l","o"," ","w","o","r","l","d",8'h1A};
    expect_line(0, LINE_TEXT, q);
    sel = 1;
    q = '{"A","l","a","r","m"," ","i","n","p","u","t"," ","1",8'h1A};
    expect_line(0, LINE_TEXT, q);
    sel = 2;
    q = '{"A","l","a","r","m"," ","i","n","p","u","t"," ","2",8'h1A};
    expect_line(0, LINE_TEXT, q);
    q = '{"A","T","+","C","M","G","F","=","1",8'h0D};
    expect_line(0, LINE_INIT, q);
    q = '{"A","T","+","C","M","G","S","=",8'h22,"0","1","2","3","4","5","6","7","8","9",8'h22,8'h0D};
    expect_line(1, LINE_DEST, q);
    q = '{"M","o","t","o","r"," ","o","v","e","r","l","o","a","d",8'h1A};
    expect_line(1, LINE_TEXT, q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
