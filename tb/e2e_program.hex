0041f9b3
40d11733
0139efb3
0031b933
0133a233
00623133
014d9633
0057feb3
01de9cb3
01421833
00581b33
81c976b3
03db0833
8087c6b3
01c812b3
01a2d6b3
0096f833
01087a33
01d1fe33
019cd133
0153e9b3
404082b3
03ef07b3
0067a833
00d6f0b3
0102a633
00eadcb3
00c760b3
01662633
026603b3
416f5b33
01e64ab3
00a2c2b3
01e49933
00690733
0016e433
03a40c33
008d10b3
0094f233
026f03b3
404088b3
01ee68b3
00c627b3
0047b233
009bf7b3
40af8333
00cd5633
8dd63ce3
01290433
408404b3
010849b3
02398eb3
04581a33
407e8933
00f124b3
2139ecb3
01159033
00c007b3
019fb3b3
02838133
01010b33
00f95033
01782933
00d98033
00c011b3
40218ab3
4184d833
41b152b3
0010d033
403e0b33
004b2933
01e954b3
01d4e833
00462ab3
00042b33
01296233
00525033
011e5f33
410f5db3
00eba6b3
00eb4e63
01a4cdb3
027c80b3
0040a9b3
ff11b233
8097b733
001def33
0032da33
003fb333
030304b3
007ce3b3
015e12b3
0152e633
40165733
003ae633
0056d6b3
0010ceb3
419258b3
00689b33
005eb033
013168b3
413886b3
4136d5b3
00f7eab3
015a8733
01aae0b3
01f0ddb3
01bd9a33
0091e0b3
00b1feb3
415508b3
017c0233
47a16493
41868db3
41ed87b3
021f0ab3
004e83b3
4158d4b3
02098d33
41ad07b3
01bdc0b3
00f4a633
40c65733
05ea2733
40570bb3
01abf433
012934b3
00f5ef33
030f0433
40210433
03240a33
404a57b3
016332b3
80269db3
0049b933
01994933
01a8f733
01ab2d33
00dce333
41db8133
005cbc33
00a57833
01e16ab3
40e553b3
01917633
00266b33
d6948da3
41a9d6b3
00b597b3
40bed1b3
01ce4f33
018f50b3
4073d533
004774b3
4094df33
40ff5033
0148fd33
017d58b3
419886b3
4156d333
01030e33
00203ab3
0081d133
00ab68b7
41a703b3
000392b3
41988133
01fe5133
0595a333
04062733
40bd5ab3
fe0c4c33
40be0433
40380733
01295333
00a66eb3
41eed0b3
013749b3
20911233
0094fab3
41720933
406c0133
d903ff6f
01ef3ab3
02180133
032f0033
01634033
40a90533
00a50db3
00a81bb3
005bf933
01933c33
00dc3933
00e74bb3
014bb7b3
03c78433
00c79db3
0147f433
006463b3
01b9ff33
