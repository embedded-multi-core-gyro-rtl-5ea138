// ads8354_model: behavioural model of the serial side of a dual-channel,
// dual-SDO 16-bit SAR ADC (ADS8354 class), for simulation only.
//
// At the falling edge of CS_n the model takes the codes on `code_a` and
// `code_b` as the converted values of the two channels and puts their MSBs on
// SDO-A and SDO-B. Every falling SCLK edge inside the frame shifts the next
// bit out, MSB first; after 16 bits the outputs read 0. With CS_n high both
// outputs read 0. The real part returns a conversion with a pipeline delay
// and has configuration registers behind SDI; neither is modelled: SDI is
// ignored and each frame returns the codes present when it started. The
// model also counts frames and the SCLK rising edges of the last frame so a
// testbench can check the frame shape.
module ads8354_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        sdi,
  output logic        sdo_a,
  output logic        sdo_b,
  input  logic [15:0] code_a,
  input  logic [15:0] code_b,
  output int          frames,
  output int          last_frame_sclks
);
  logic [15:0] sh_a = '0;
  logic [15:0] sh_b = '0;
  int          sclks = 0;
  logic        unused_sdi;

  assign unused_sdi = sdi;

  initial begin
    frames           = 0;
    last_frame_sclks = 0;
  end

  always @(negedge cs_n) begin
    sh_a   = code_a;
    sh_b   = code_b;
    sclks  = 0;
    frames = frames + 1;
  end

  always @(posedge cs_n) last_frame_sclks = sclks;

  always @(posedge sclk) if (!cs_n) sclks = sclks + 1;

  always @(negedge sclk) begin
    if (!cs_n) begin
      sh_a = {sh_a[14:0], 1'b0};
      sh_b = {sh_b[14:0], 1'b0};
    end
  end

  assign sdo_a = !cs_n && sh_a[15];
  assign sdo_b = !cs_n && sh_b[15];
endmodule
