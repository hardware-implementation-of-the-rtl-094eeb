// tb_spot_ctrl: self-checking test of the sequencer copy and its TMR loop.
//
// Three spot_ctrl copies are closed through a tmr_voter exactly as in the
// top level. The test walks the phases for a couple of images and for a
// single image, comparing the voted state with the expected sequence
// IMG(first) -> IMG(second) -> FUSE -> ANTI -> GROW -> IMG, and upsets one
// copy at a time to check that the voted state is unaffected and the upset
// copy is back in step one clock later.
module tb_spot_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic single, cl_done, fus_done, anti_done, grow_done;
  logic [2:0] seu, st1, st2, st3, st_v, faulty;
  logic mis;
  spot_ctrl c1 (.clk, .rst_n, .state_recv(st_v), .single, .cl_done, .fus_done, .anti_done,
                .grow_done, .seu_flip(seu[0]), .state_out(st1));
  spot_ctrl c2 (.clk, .rst_n, .state_recv(st_v), .single, .cl_done, .fus_done, .anti_done,
                .grow_done, .seu_flip(seu[1]), .state_out(st2));
  spot_ctrl c3 (.clk, .rst_n, .state_recv(st_v), .single, .cl_done, .fus_done, .anti_done,
                .grow_done, .seu_flip(seu[2]), .state_out(st3));
  tmr_voter #(.W(3)) v (.in1(st1), .in2(st2), .in3(st3), .voted(st_v), .mismatch(mis), .faulty);

  int checks = 0, failures = 0;
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  task automatic expect_st(logic [2:0] e, string what);
    checks++;
    if (st_v !== e) begin failures++; $display("FAIL %s: state %b expected %b", what, st_v, e); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    single = 0; cl_done = 0; fus_done = 0; anti_done = 0; grow_done = 0; seu = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      expect_st(3'b000, "idle");
      pulse(cl_done);   expect_st(3'b001, "second image");
      // upset copy rep while waiting
      @(negedge clk); seu = 3'(1 << rep); @(negedge clk); seu = 0;
      checks++;
      if (!mis) begin failures++; $display("upset not detected"); end
      expect_st(3'b001, "voted state after upset");
      @(negedge clk);
      checks++;
      if (mis) begin failures++; $display("upset copy not resynchronised"); end
      pulse(cl_done);   expect_st(3'b010, "fuse");
      pulse(fus_done);  expect_st(3'b100, "antitracking");
      pulse(anti_done); expect_st(3'b110, "growth");
      pulse(cl_done);   expect_st(3'b110, "cl_done ignored in growth");
      pulse(grow_done); expect_st(3'b000, "back to first image");
    end
    single = 1;
    pulse(cl_done);   expect_st(3'b010, "single: straight to fuse");
    pulse(fus_done); pulse(anti_done); pulse(grow_done);
    expect_st(3'b000, "single done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
