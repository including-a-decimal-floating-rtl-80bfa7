6040bb9167bea0918c2238000000000001c0ba7b65181fa5f840b914de24a556a400
700ef7e5efec54621f22380000000000010ef4d215e232001002f7136b0a22620f00
4000680000318936c421d40000000f53a9223800000000000000066718378bdef600
60223800000000000122380000000000012238000000000001223800000000000200
70223000000000008022380000000000012230000000000080223000000000000000
73223000000000008022380000000000012230000000000080a23000000000000000
40a23800000000000022380000000000052238000000000000a23800000000000000
0022400000000000052238000000000001222c000000000000222c0000000a000000
002240000000000000223800000000000722240000000000a322240000000000a300
606e38ff3fcff3fcff22380000000000012238000000000001263c00000000000000
606e38ff3fcff3fcff22380000000000012234000000000005263c00000000000008
606e38ff3fcff3fcfe223800000000000122340000000000056e38ff3fcff3fcfe08
4077fcff3fcff3fcff2238000000000010223800000000000078000000000000000a
4477fcff3fcff3fcff2238000000000010223800000000000077fcff3fcff3fcff0a
42f7fcff3fcff3fcff22380000000000102238000000000000f7fcff3fcff3fcff0a
40031800000000000103180000000000012238000000000000000000000000000009
40002000000a395bcf22100000000000012238000000000000000000000014d2e809
40000000000000000122340000000000052238000000000000000000000000000009
0042e800000000000123280000000000012238000000000001479c00000000000008
6043fc0000000000012238000000000001223800000000000047c000000000000000
6043fc002000000000223800000000000143fc00000000000043fc00200000000000
007800000000000000223800000000000022380000000000017c0000000000000004
0078000000000000002238000000000002f8000000000000007c0000000000000004
00f80000000000000022380000000000022238000000000005f80000000000000000
6022380000000000012238000000000001f800000000000000f80000000000000000
007c000000000000a3223800000000000222380000000000057c000000000000a300
00223800000000000122380000000000027e000000000000777c0000000000007704
00fc000000000000057e0000000000000922380000000000017c0000000000000904
00263934b9c1e28e56263934b9c1e28e56a676a435e7d68d0fa639732a478c586400
10223800000000000322380000000000072238000000000021223800000000000000
13223800000000000322380000000000072238000000000021a23800000000000000
0023000000000000012238000000000001a1e800000000000126c400000000000008
00223800000000000121e8000000000001a300000000000001a6c400000000000008
6025fd34b9c1e28e56223800000000000121f800000000000525fd34b9c1e28e5608
60a5fd34b9c1e28e562238000000000001a1f8000000000005a5fd34b9c1e28e5608
6025fd34b9c1e28e55223800000000000121f400000000005025fd34b9c1e28e5608
6025fd34b9c1e28e55223800000000000121f400000000005125fd34b9c1e28e5608
702288000000000001223800000000000121c0000000000001264c00000000000008
40223400000000002500000000000000012238000000000000000000000000000209
6125fd34b9c1e28e56223800000000000121f800000000000525fd34b9c1e28e5708
61a5fd34b9c1e28e562238000000000001a1f8000000000005a5fd34b9c1e28e5708
6125fd34b9c1e28e55223800000000000121f400000000005025fd34b9c1e28e5608
6125fd34b9c1e28e55223800000000000121f400000000005125fd34b9c1e28e5608
712288000000000001223800000000000121c0000000000001264c00000000000008
41223400000000002500000000000000012238000000000000000000000000000309
6225fd34b9c1e28e56223800000000000121f800000000000525fd34b9c1e28e5708
62a5fd34b9c1e28e562238000000000001a1f8000000000005a5fd34b9c1e28e5608
6225fd34b9c1e28e55223800000000000121f400000000005025fd34b9c1e28e5608
6225fd34b9c1e28e55223800000000000121f400000000005125fd34b9c1e28e5608
722288000000000001223800000000000121c0000000000001264c00000000000008
42223400000000002500000000000000012238000000000000000000000000000309
6325fd34b9c1e28e56223800000000000121f800000000000525fd34b9c1e28e5608
63a5fd34b9c1e28e562238000000000001a1f8000000000005a5fd34b9c1e28e5708
6325fd34b9c1e28e55223800000000000121f400000000005025fd34b9c1e28e5508
6325fd34b9c1e28e55223800000000000121f400000000005125fd34b9c1e28e5508
732288000000000001223800000000000121c00000000000016e48ff3fcff3fcff08
43223400000000002500000000000000012238000000000000000000000000000209
6425fd34b9c1e28e56223800000000000121f800000000000525fd34b9c1e28e5608
64a5fd34b9c1e28e562238000000000001a1f8000000000005a5fd34b9c1e28e5608
6425fd34b9c1e28e55223800000000000121f400000000005025fd34b9c1e28e5508
6425fd34b9c1e28e55223800000000000121f400000000005125fd34b9c1e28e5508
742288000000000001223800000000000121c00000000000016e48ff3fcff3fcff08
44223400000000002500000000000000012238000000000000000000000000000209
6525fd34b9c1e28e56223800000000000121f800000000000525fd34b9c1e28e5708
65a5fd34b9c1e28e562238000000000001a1f8000000000005a5fd34b9c1e28e5708
6525fd34b9c1e28e55223800000000000121f400000000005025fd34b9c1e28e5608
6525fd34b9c1e28e55223800000000000121f400000000005125fd34b9c1e28e5608
752288000000000001223800000000000121c0000000000001264c00000000000008
45223400000000002500000000000000012238000000000000000000000000000309
6625fd34b9c1e28e56223800000000000121f800000000000525fd34b9c1e28e5608
66a5fd34b9c1e28e562238000000000001a1f8000000000005a5fd34b9c1e28e5608
6625fd34b9c1e28e55223800000000000121f400000000005025fd34b9c1e28e5508
6625fd34b9c1e28e55223800000000000121f400000000005125fd34b9c1e28e5608
762288000000000001223800000000000121c0000000000001264c00000000000008
46223400000000002500000000000000012238000000000000000000000000000209
414090000000000019401c0038b32beefb223800000000000042740306819751c300
0401f800000000002ac15c00000000002b0000000000000000b8ef0c000000000000
14221c0000daf3e54a221800e079343af8a27000000096a2536e4da894c000002708
6402e0007c47c8a481223800000000000102fc001cd6292fba1ee9a65497ba311b08
61223c00000001d04f2238000000000001a25c001813027499ba482306c911ffac08
602218000030916510223800000000000122100093ab00890c221000b26357350c00
16a23c000000010a55aa425e8e8ec0f6fda244000014708da7265860ed4eaa8f4b08
4501500000030559614288000000010203223800000000000021a00148a43e4cab00
01211800e845a8545bc2e00000000000688000000000000000d1b98d90822d180000
01222400000086ea3a221c0005a7d1c541a2000000000029b52612164e40387d1808
0621d4097099ab606eee870d9230e25434258bf3a2babeffecee54e2a07ce107f308
4342f00000000d061543fc00d72c3c7cdb223800000000000077fcff3fcff3fcff0a
4622d00010bde5a1c9220c0000063fe2cd22380000000000002ab3a9ca2032989208
62a24800e3b4a06d092238000000000001b1c8421985118513ee3b6c1319c0680008
763a3c0fa19d0666272238000000000001a2880000000b54033662d00c00603e8608
63028800000000014c2238000000000001f800000000000000f80000000000000000
410004000000004a0c006000000001986c2238000000000000000000000000000109
72a22428942677dae42238000000000001222000000001e787a2214aa1373935c700
14a22000000000cacfa23800000000081122240000000004bc22200000065a5cf900
04a314000000000001a33c0000005d42010214000000a4901037f750804000000008
13221806b66eab8fe32234392f4cd2dcb322440000000169b92a43197c144adfb608
132290000000001ea5a2740000031dc7072abdab53a26f4000b2bfe6bd95da000000
0280081fdd833b57170094000ef2cf00880000000000000000800000000000000009
06a1d8000009da206ea1e400002b543ce2213000113c3bf719318e0ec8b50ab63908
0222300000000000ac22300000018336ada2760b8ba120252ab2703e928a00e83f08
44221000000000007721b000000007d3172238000000000000218800000289368900
12218c00000006af63003c00000b9dd06440f80000009c9e30f4d7278a4ff3fcff08
05c3fc79d9ccf49f0bc35c0000ddd4b92bf800000000000000f80000000000000000
10222400002e2a1197a24000000000038b321dbb36395fc000ea1fea65e31b000000
60a24400990ae16ae82238000000000001a23800203cbf78e1a23a650200e798e100
4443e8000000538fd943140000000001f0223800000000000077fcff3fcff3fcff0a
10816c00000001e8cb0090000a582809888000000000000000800000000000000009
71016c00000000000922380000000000018000000000000000653000000000000000
0500840000075dc4fd017cf833330060808000000000000000000000000000000009
06a2300000037b0c3cb22a4503058ad433a6436928efa2593b2a200000027e799a00
4243dc00006f3293aa771bd9aab59b68bd223800000000000078000000000000000a
66a21800000064a4332238000000000001224a0282f355376b324424c71d88d87c08
10817c000000000145814000f869e978188000000000000000000000000000000009
63a24c000000020fe42238000000000001a238000462309d87a23800087df89d8700
01c36800000000000443ac0000000002827800000000000000780000000000000000
06c3700000739aaa31c2f4001a4cd5cdebf800000000000000f80000000000000000
156e4513e22d229a65a23c0000000b6ca0a2600001af3c3fc0b6622b55759d4fe208
12424803732e6c3ffcc000000000000192a06c0000070f7be1f7fcff3fcff3fcff0a
7122440000000001782238000000000001a2800000000000063a4400000000017800
13a2400005ea556679224400570d923362a22c0000000001f7a66a3b8c9b7dc04208
63a2240000000000022238000000000001a250000000000280a22450000000000200
1622200000030e81962217a06f1f701058227800000001024ab24c4877cff3fff908
4143c4000036741e4e43800000000008d2223800000000000078000000000000000a
6222440000073f69522238000000000001a228000000000012222bb7732993fcee00
60a23c000005fbc33e2238000000000001a21037df0401eafaee1fdd297761007b08
702a360d3c1b012f98223800000000000123680001dfd5e86abf51fd5e86a0000008
63c33000000000006a2238000000000001f800000000000000f80000000000000000
452238000000000169a2500000000f28e22238000000000000a25000001106fef800
61223000000000000122380000000000012254068c9e74eefd3a4a3279d3bbf40108
61a23a64048ba5e4582238000000000001a214000000000058b23740285ace6a8b08
02a2440000000003a022d00000259dc975a23c000008d82ef7aecd89d018a0000008
76435c0000000000a422380000000000017800000000000000f80000000000000000
10c360000119926c1743100016523c2a167800000000000000f80000000000000000
64013c0011369d2b7c22380000000000018000000000000000112a66eba6bc000000
15809400000000161d808000002809d3060000000000000000000000000000000009
12802000000069d441010000001e412dfd0000000000000000800000000000000009
