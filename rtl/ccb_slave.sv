// ccb_slave: one slave FPGA of the CCB.
//
// Four ccb_sampler instances integrate samples from four ADCs into 4 bins
// each; their PISOs form one chain of 32 16-bit words (sampler 0 first, bin 0
// first, low half first).  A shared ccb_signal_injector supplies fake samples
// in test mode and restarts on start.  The slave is selected when the bus
// address equals its board_id and read (or write) is high; write is ignored.
// While selected for read it drives data_oe and presents on data either the
// head of the chain (integration mode) or the raw sample of the sampler named
// by phase (dump mode, MUX2), plus its heartbeat on data_hb.  Each rising
// edge with the slave read-selected shifts the chain by one word, so the
// master reads one word per clock, the first one a clock after it raises
// read.  New integrations are readable two clocks after start.
module ccb_slave #(
  parameter int NSAMP = 4
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             adc_clk,
  input  logic [13:0]      adc_sample [NSAMP],
  input  logic [NSAMP-1:0] adc_overflow,
  input  logic [1:0]       board_id,
  input  logic [1:0]       addr,
  input  logic             read,
  input  logic             write,
  input  logic             start,
  input  logic             blank,
  input  logic [1:0]       phase,
  input  logic             dump,
  input  logic             test,
  output logic [15:0]      data,
  output logic             data_hb,
  output logic             data_oe,
  output logic             beat
);
  logic        select, rd_sel;
  logic [13:0] fake;
  logic [15:0] chain [NSAMP+1];
  logic [15:0] raw   [NSAMP];

  assign select = (addr == board_id) && (read || write);
  assign rd_sel = select && read;

  ccb_signal_injector u_inj (.clock, .reset, .start, .q(fake));
  ccb_heartbeat_gen   u_hb  (.clock, .reset, .beat);

  assign chain[NSAMP] = '0;
  for (genvar s = 0; s < NSAMP; s++) begin : g_samp
    ccb_sampler u_samp (
      .clock, .reset, .adc_clk, .adc_sample(adc_sample[s]), .adc_overflow(adc_overflow[s]),
      .fake, .test, .blank, .phase, .start, .shift(rd_sel),
      .sin(chain[s+1]), .sout(chain[s]), .raw(raw[s]));
  end

  assign data    = dump ? raw[phase] : chain[0];
  assign data_hb = beat;
  assign data_oe = rd_sel;
endmodule
